// lp_bist_top: low-power test-per-scan BIST around a circuit under test.
//
// Two mechanisms cut test power:
//   * First Level Supply gating (FLS): during scan shift the first-level gates
//     behind the scan flip-flops have their supply cut and their outputs held
//     at a chosen vector (IVC_VEC, input vector control), so the scan ripple
//     never reaches the rest of the combinational block (fls_first_level).
//   * Scan partitioning: the scan flip-flops and primary inputs are split
//     into K partitions. Each scan partition has its own chain, scan-in,
//     scan-out and gated clock (clk_gate); a modulo-K counter and decoder
//     (partition_sel inside bist_ctrl) select one partition at a time, so
//     only one partition shifts or captures in any test clock cycle and only
//     one primary-input partition changes per phase.
// Patterns come from two LFSRs: pi_pattern_gen for the primary inputs and a
// scan LFSR whose serial output is steered to the active chain. A MISR
// compacts the active chain's scan-out during shift and the primary outputs
// during each capture cycle.
//
// Interface: the logic of the circuit under test behind its first level is
// outside this module. fl_out (first-level outputs) and cut_pi go to it;
// cut_po and cut_next_state come back. scan_out[p] is partition p's own
// scan-out (its last flip-flop). Partition p holds state bits
// [part_off(NUM_SFF,K,p) +: part_len(NUM_SFF,K,p)] (the offline partitioning
// decides the order of the flip-flops on these ports). In normal mode
// (test_mode=0) every partition clock follows clk, the flip-flops load
// cut_next_state, the primary inputs come from func_pi and nothing is gated.
// In test mode a pulse on bist_start runs a session of NUM_PATTERNS patterns
// ((NUM_PATTERNS+1)*NUM_SFF + NUM_PATTERNS*K cycles of busy); bist_done then
// stays high and signature holds the result. Reset is asynchronous, active low.
//
// The architecture (LFSRs, partitioned chains with own clocks from CtrlA/B,
// counter and decoder, scan-out selector, MISR, FLS with IVC) follows the
// document. Default sizes: K=2 partitions as in its main figure, 74
// flip-flops and 160 first-level gates of its smallest benchmark; the primary
// input/output counts, pattern count, LFSR/MISR polynomial, MISR input
// arrangement, capture order and reset are this design's choices.
module lp_bist_top #(
  parameter int unsigned       NUM_PI       = 17,
  parameter int unsigned       NUM_PO       = 5,
  parameter int unsigned       NUM_SFF      = 74,
  parameter int unsigned       K            = 2,
  parameter int unsigned       NUM_FL       = 160,
  parameter int unsigned       NUM_PATTERNS = 1024,
  parameter int unsigned       LFSR_W       = 32,
  parameter int unsigned       MISR_W       = 32,
  parameter logic [NUM_FL-1:0] IVC_VEC      = '1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               test_mode,
  input  logic               bist_start,
  input  logic [NUM_PI-1:0]  func_pi,
  input  logic [NUM_PO-1:0]  cut_po,
  input  logic [NUM_SFF-1:0] cut_next_state,
  output logic [NUM_FL-1:0]  fl_out,
  output logic [NUM_PI-1:0]  cut_pi,
  output logic [NUM_SFF-1:0] state_q,
  output logic               bist_busy,
  output logic               bist_done,
  output logic [MISR_W-1:0]  signature,
  output logic               shift_en,
  output logic [K-1:0]       part_ctrl,
  output logic [K-1:0]       scan_out
);
  import lpbist_pkg::*;

  // ---------------- test sequencer ----------------
  logic         b_shift, b_capture, b_lfsr_en, b_misr_en, b_misr_clear;
  logic [K-1:0] b_ctrl, b_pi_load;
  logic [31:0]  b_pattern;

  bist_ctrl #(.K(K), .NUM_SFF(NUM_SFF), .NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst_n,
    .start       (bist_start && test_mode),
    .shift_en    (b_shift),
    .capture     (b_capture),
    .part_ctrl   (b_ctrl),
    .pi_load     (b_pi_load),
    .scan_lfsr_en(b_lfsr_en),
    .misr_en     (b_misr_en),
    .misr_clear  (b_misr_clear),
    .busy        (bist_busy),
    .done        (bist_done),
    .pattern     (b_pattern)
  );

  assign shift_en  = test_mode && b_shift;
  assign part_ctrl = test_mode ? b_ctrl : '0;

  // ---------------- pattern sources ----------------
  logic [NUM_PI-1:0] test_pi;
  logic              scan_rnd;

  pi_pattern_gen #(.NUM_PI(NUM_PI), .K(K), .W(LFSR_W)) u_pi_gen (
    .clk, .rst_n, .load(test_mode ? b_pi_load : '0), .pi(test_pi)
  );

  lfsr #(.W(LFSR_W), .SEED(LFSR_W'(32'h5EED_0001))) u_scan_lfsr (
    .clk, .rst_n, .en(test_mode && b_lfsr_en), .state(), .sout(scan_rnd)
  );

  assign cut_pi = test_mode ? test_pi : func_pi;

  // ---------------- partitioned scan chains ----------------
  logic [K-1:0] so;

  for (genvar p = 0; p < K; p++) begin : g_part
    localparam int unsigned LEN = part_len(NUM_SFF, K, p);
    localparam int unsigned OFF = part_off(NUM_SFF, K, p);
    logic pclk;

    clk_gate u_cg (
      .clk, .en(!test_mode || b_ctrl[p]), .gclk(pclk)
    );

    scan_chain #(.LEN(LEN)) u_chain (
      .clk     (pclk),
      .rst_n,
      .shift_en(shift_en),
      .si      (scan_rnd && b_ctrl[p]),
      .d       (cut_next_state[OFF +: LEN]),
      .q       (state_q[OFF +: LEN]),
      .so      (so[p])
    );
  end

  // ---------------- FLS-gated first level ----------------
  fls_first_level #(
    .N_PI(NUM_PI), .N_SFF(NUM_SFF), .NUM_FL(NUM_FL), .IVC_VEC(IVC_VEC)
  ) u_fl (
    .pi(cut_pi), .sff_q(state_q), .gc(!shift_en), .fl_out
  );

  // ---------------- response compaction ----------------
  logic so_sel;
  assign so_sel   = |(so & b_ctrl);
  assign scan_out = so;

  misr #(.W(MISR_W), .N_IN(NUM_PO + 1)) u_misr (
    .clk, .rst_n,
    .clear    (b_misr_clear),
    .en       (test_mode && b_misr_en),
    .din      ({b_capture ? cut_po : '0, b_shift && so_sel}),
    .signature
  );

endmodule
