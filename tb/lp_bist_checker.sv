// lp_bist_checker: stimulus and checks for an lp_bist_top instance.
//
// Sequence: reset; normal mode (every partition clocked each cycle, state
// loads the next state, func_pi reaches the logic); test mode with one BIST
// session; normal mode again. During the session each cycle is checked:
// exactly the partition selected in the previous cycle received a clock
// edge, primary inputs changed only inside the active partition, and while
// shifting every supply-gated first-level output shows its IVC value. At the
// end the signature and the session length are compared with the golden
// reference, and each mechanism (shift, capture, partition switch, PI
// partition update per partition, FLS hold, clock gating, normal mode,
// mode switch) must have occurred at least once.
module lp_bist_checker #(
  parameter int unsigned       NUM_PI       = 17,
  parameter int unsigned       NUM_PO       = 5,
  parameter int unsigned       NUM_SFF      = 74,
  parameter int unsigned       K            = 2,
  parameter int unsigned       NUM_FL       = 160,
  parameter logic [NUM_FL-1:0] IVC_VEC      = '1,
  parameter int unsigned       MAX_CYCLES   = 200000
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               test_mode,
  output logic               bist_start,
  output logic [NUM_PI-1:0]  func_pi,
  input  logic [NUM_SFF-1:0] cut_next_state,
  input  logic [NUM_FL-1:0]  fl_out,
  input  logic [NUM_PI-1:0]  cut_pi,
  input  logic [NUM_SFF-1:0] state_q,
  input  logic               bist_busy,
  input  logic               bist_done,
  input  logic [31:0]        signature,
  input  logic               shift_en,
  input  logic [K-1:0]       part_ctrl,
  input  logic [K-1:0]       scan_out,
  input  logic [K-1:0]       pclk,
  input  logic [31:0]        sig_exp,
  input  int                 cycles_exp,
  output logic               finished,
  output int                 checks,
  output int                 failures
);
  localparam int unsigned N = NUM_PI + NUM_SFF;

  int n_shift = 0, n_capture = 0, n_switch = 0, n_fls_hold = 0, n_gated = 0;
  int n_normal = 0, n_mode_switch = 0;
  int n_pi_upd [K];
  int edges [K];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL(K=%0d): %s at %0t", K, what, $time); end
  endtask

  for (genvar p = 0; p < K; p++) begin : g_edge
    always @(posedge pclk[p]) edges[p]++;
  end

  // gated first-level gates (those touching a scan flip-flop)
  function automatic logic [NUM_FL-1:0] gated_mask();
    logic [NUM_FL-1:0] m;
    int ia, ib;
    for (int g = 0; g < NUM_FL; g++) begin
      ia = g % N;
      ib = (7 * g + 3) % N;
      if (ib == ia) ib = (ia + 1) % N;
      m[g] = (ia >= NUM_PI) || (ib >= NUM_PI);
    end
    return m;
  endfunction

  function automatic int pi_part(int i);
    int off = 0;
    for (int p = 0; p < K; p++) begin
      off += NUM_PI / K + ((p < NUM_PI % K) ? 1 : 0);
      if (i < off) return p;
    end
    return K - 1;
  endfunction

  task automatic clear_edges();
    for (int p = 0; p < K; p++) edges[p] = 0;
  endtask

  task automatic normal_cycles(input int n);
    logic [NUM_SFF-1:0] ns;
    for (int i = 0; i < n; i++) begin
      func_pi = NUM_PI'({$urandom, $urandom});
      #1;
      check(cut_pi == func_pi, "normal mode: func_pi reaches the logic");
      check(!shift_en && part_ctrl == '0, "normal mode: no shift");
      ns = cut_next_state;
      clear_edges();
      @(negedge clk);
      check(state_q == ns, "normal mode: state loads next state");
      for (int p = 0; p < K; p++) check(edges[p] == 1, "normal mode: every partition clocked");
      n_normal++;
    end
  endtask

  logic [NUM_FL-1:0] gmask;
  initial begin
    int busy_cycles, nclk;
    logic [K-1:0] ctrl_prev;
    logic [NUM_PI-1:0] pi_prev;
    logic shift_prev, cap_prev;
    finished = 1'b0; checks = 0; failures = 0;
    for (int p = 0; p < K; p++) n_pi_upd[p] = 0;
    gmask = gated_mask();
    rst_n = 1'b0; test_mode = 1'b0; bist_start = 1'b0; func_pi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    normal_cycles(20);

    // ---- BIST session ----
    test_mode = 1'b1;
    n_mode_switch++;
    @(negedge clk);
    check(!bist_busy && !bist_done, "idle in test mode before start");
    bist_start = 1'b1;
    clear_edges();
    @(negedge clk);
    bist_start = 1'b0;
    busy_cycles = 0;
    pi_prev = cut_pi;
    while (!bist_done && busy_cycles < int'(MAX_CYCLES)) begin
      check(bist_busy, "busy until done");
      ctrl_prev  = part_ctrl;
      shift_prev = shift_en;
      cap_prev   = bist_busy && !shift_en;
      pi_prev    = cut_pi;
      for (int p = 0; p < K; p++) begin
        int last;
        last = -1;
        for (int q = 0; q <= p; q++) last += NUM_SFF / K + ((q < NUM_SFF % K) ? 1 : 0);
        check(scan_out[p] == state_q[last], "scan_out is the partition's last flip-flop");
      end
      if (shift_en) begin
        check((fl_out & gmask) == (IVC_VEC & gmask), "FLS: gated first-level outputs hold IVC during shift");
        n_fls_hold++;
        n_shift++;
      end else n_capture++;
      clear_edges();
      @(negedge clk);
      busy_cycles++;
      nclk = 0;
      for (int p = 0; p < K; p++) begin
        nclk += edges[p];
        check(edges[p] == int'(ctrl_prev[p]), "only the selected partition is clocked");
      end
      if (nclk < int'(K)) n_gated++;
      check(nclk == 1, "exactly one partition clock per test cycle");
      if (bist_busy && part_ctrl != ctrl_prev) n_switch++;
      for (int i = 0; i < NUM_PI; i++)
        if (cut_pi[i] != pi_prev[i]) begin
          check(ctrl_prev[pi_part(i)] && shift_prev, "PI changes only in the active partition");
        end
      for (int p = 0; p < K; p++) begin
        logic chg;
        chg = 1'b0;
        for (int i = 0; i < NUM_PI; i++) if (pi_part(i) == p && cut_pi[i] != pi_prev[i]) chg = 1'b1;
        if (chg) n_pi_upd[p]++;
      end
    end
    check(bist_done, "session finished");
    check(busy_cycles == cycles_exp, $sformatf("session length %0d, expected %0d", busy_cycles, cycles_exp));
    check(signature == sig_exp, $sformatf("signature %h, expected %h", signature, sig_exp));
    clear_edges();
    repeat (3) @(negedge clk);
    check(bist_done && signature == sig_exp, "signature held after done");
    for (int p = 0; p < K; p++) check(edges[p] == 0, "no partition clock after done");

    // ---- back to normal mode ----
    test_mode = 1'b0;
    n_mode_switch++;
    @(negedge clk);
    normal_cycles(10);

    check(n_shift > 0, "mechanism: scan shift");
    check(n_capture > 0, "mechanism: capture");
    check(n_switch > 0, "mechanism: partition switch");
    check(n_fls_hold > 0, "mechanism: FLS hold");
    check(n_gated > 0, "mechanism: partition clock gated");
    check(n_normal > 0, "mechanism: normal mode");
    check(n_mode_switch >= 2, "mechanism: mode switch");
    for (int p = 0; p < K; p++) check(n_pi_upd[p] > 0, $sformatf("mechanism: PI partition %0d update", p));
    $display("K=%0d: shift=%0d capture=%0d switches=%0d fls_hold=%0d gated=%0d normal=%0d mode_switch=%0d pi_upd[0]=%0d",
             K, n_shift, n_capture, n_switch, n_fls_hold, n_gated, n_normal, n_mode_switch, n_pi_upd[0]);
    finished = 1'b1;
  end

endmodule
