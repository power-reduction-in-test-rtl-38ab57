// lp_bist_bench: one lp_bist_top at the given sizes with its
// circuit-under-test model, golden reference and checker. The defaults are a
// small configuration (4 PIs, 3 POs, 7 scan flip-flops, 12 first-level
// gates, 6 patterns); the IVC vector mixes GND- and VDD-gated gates.
module lp_bist_bench #(
  parameter int unsigned K    = 2,
  parameter int unsigned NPI  = 4,
  parameter int unsigned NPO  = 3,
  parameter int unsigned NSFF = 7,
  parameter int unsigned NFL  = 12,
  parameter int unsigned NP   = 6
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam logic [NFL-1:0] IVC = NFL'({(NFL + 3) / 4{4'b0110}} ^ {(NFL + 2) / 3{3'b011}});
  localparam int unsigned MAXC = (NP + 1) * NSFF + NP * K + 100;

  logic rst_n, test_mode, bist_start, bist_busy, bist_done, shift_en;
  logic [NPI-1:0] func_pi, cut_pi;
  logic [NPO-1:0] cut_po;
  logic [NSFF-1:0] cut_next_state, state_q;
  logic [NFL-1:0] fl_out;
  logic [31:0] signature, sig_exp;
  logic [K-1:0] part_ctrl, pclk, scan_out;
  int cycles_exp;

  lp_bist_top #(.NUM_PI(NPI), .NUM_PO(NPO), .NUM_SFF(NSFF), .K(K), .NUM_FL(NFL),
                .NUM_PATTERNS(NP), .IVC_VEC(IVC)) dut (.*);

  for (genvar p = 0; p < K; p++) begin : g_clk
    assign pclk[p] = dut.g_part[p].pclk;
  end

  lp_bist_env #(.NUM_PI(NPI), .NUM_PO(NPO), .NUM_SFF(NSFF), .K(K), .NUM_FL(NFL),
                .NUM_PATTERNS(NP)) env (.*);

  lp_bist_checker #(.NUM_PI(NPI), .NUM_PO(NPO), .NUM_SFF(NSFF), .K(K), .NUM_FL(NFL),
                    .IVC_VEC(IVC), .MAX_CYCLES(MAXC)) chk (.*);

endmodule
