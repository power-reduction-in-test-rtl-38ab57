// lp_bist_env: circuit-under-test model and golden reference for the
// lp_bist_top testbenches.
//
// The combinational logic behind the first level is a small arbitrary model
// (XOR/AND mixing of first-level outputs and primary inputs):
//   next_state[i] = fl[i%F] ^ fl[(3i+1)%F] ^ (fl[(5i+2)%F] & pi[i%P])
//   po[j]         = XOR of fl[g] over g%O == j, XOR pi[j%P]
// At time zero sig_exp is computed by an independent step-by-step model of a
// whole BIST session: both LFSRs, the partitioned chains shifted one after
// another, one capture per partition, PI partition p reloaded in the first
// shift cycle of partition p, the final unload pass, and the MISR fed with
// the active chain's scan-out while shifting (except during the first load,
// which unloads the state from before the session) and the primary outputs while
// capturing. cycles_exp is the expected number of busy cycles.
module lp_bist_env #(
  parameter int unsigned       NUM_PI       = 17,
  parameter int unsigned       NUM_PO       = 5,
  parameter int unsigned       NUM_SFF      = 74,
  parameter int unsigned       K            = 2,
  parameter int unsigned       NUM_FL       = 160,
  parameter int unsigned       NUM_PATTERNS = 1024
) (
  input  logic [NUM_FL-1:0]  fl_out,
  input  logic [NUM_PI-1:0]  cut_pi,
  output logic [NUM_PO-1:0]  cut_po,
  output logic [NUM_SFF-1:0] cut_next_state,
  output logic [31:0]        sig_exp,
  output int                 cycles_exp
);
  localparam int unsigned N = NUM_PI + NUM_SFF;

  function automatic void cut_eval(input logic [NUM_FL-1:0] fl, input logic [NUM_PI-1:0] pi,
                                   output logic [NUM_SFF-1:0] ns, output logic [NUM_PO-1:0] po);
    for (int i = 0; i < NUM_SFF; i++)
      ns[i] = fl[i % NUM_FL] ^ fl[(3 * i + 1) % NUM_FL] ^ (fl[(5 * i + 2) % NUM_FL] & pi[i % NUM_PI]);
    for (int j = 0; j < NUM_PO; j++) po[j] = pi[j % NUM_PI];
    for (int g = 0; g < NUM_FL; g++) po[g % NUM_PO] ^= fl[g];
  endfunction

  always_comb cut_eval(fl_out, cut_pi, cut_next_state, cut_po);

  // ungated first level (capture cycles), example wiring of fls_first_level
  function automatic logic [NUM_FL-1:0] first_level(input logic [NUM_PI-1:0] pi,
                                                    input logic [NUM_SFF-1:0] st);
    logic [N-1:0] cin;
    logic [NUM_FL-1:0] fl;
    int ia, ib;
    cin = {st, pi};
    for (int g = 0; g < NUM_FL; g++) begin
      ia = g % N;
      ib = (7 * g + 3) % N;
      if (ib == ia) ib = (ia + 1) % N;
      case (g % 4)
        0: fl[g] = cin[ia] & cin[ib];
        1: fl[g] = cin[ia] | cin[ib];
        2: fl[g] = !(cin[ia] & cin[ib]);
        default: fl[g] = !(cin[ia] | cin[ib]);
      endcase
    end
    return fl;
  endfunction

  function automatic logic [31:0] lfsr_step(input logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  function automatic logic [31:0] misr_step(input logic [31:0] s, input logic [NUM_PO:0] din);
    logic [31:0] f;
    f = '0;
    for (int i = 0; i <= NUM_PO; i++) f[i % 32] ^= din[i];
    return lfsr_step(s) ^ f;
  endfunction

  function automatic int plen(int p);
    return NUM_SFF / K + ((p < NUM_SFF % K) ? 1 : 0);
  endfunction
  function automatic int pilen(int p);
    return NUM_PI / K + ((p < NUM_PI % K) ? 1 : 0);
  endfunction

  initial begin
    logic [NUM_SFF-1:0] st, ns;
    logic [NUM_PI-1:0]  pi;
    logic [NUM_PO-1:0]  po;
    logic [31:0] pil, scl, sig;
    int off, pioff, cyc;
    st = '0; pi = '0; sig = '0; cyc = 0;
    pil = 32'h1ACE_B00C;
    scl = 32'h5EED_0001;
    for (int pat = 0; pat <= int'(NUM_PATTERNS); pat++) begin
      off = 0; pioff = 0;
      for (int p = 0; p < int'(K); p++) begin
        for (int c = 0; c < plen(p); c++) begin
          if (pat > 0) sig = misr_step(sig, {{NUM_PO{1'b0}}, st[off + plen(p) - 1]});
          if (c == 0 && pat < int'(NUM_PATTERNS)) begin
            for (int j = 0; j < pilen(p); j++) pi[pioff + j] = pil[j % 32];
            pil = lfsr_step(pil);
          end
          for (int i = plen(p) - 1; i > 0; i--) st[off + i] = st[off + i - 1];
          st[off] = scl[31];
          scl = lfsr_step(scl);
          cyc++;
        end
        off += plen(p);
        pioff += pilen(p);
      end
      if (pat == int'(NUM_PATTERNS)) break;
      off = 0;
      for (int p = 0; p < int'(K); p++) begin
        cut_eval(first_level(pi, st), pi, ns, po);
        sig = misr_step(sig, {po, 1'b0});
        for (int i = 0; i < plen(p); i++) st[off + i] = ns[off + i];
        off += plen(p);
        cyc++;
      end
    end
    sig_exp = sig;
    cycles_exp = cyc;
  end

endmodule
