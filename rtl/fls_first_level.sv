// fls_first_level: the first level of the combinational block under test,
// built from FLS-gated gates, with input vector control (IVC).
//
// The circuit inputs are cin = {sff_q, pi} (primary inputs at the low
// indices). NUM_FL two-input gates are driven from them. Every gate that
// touches a scan flip-flop is supply-gated by gc (low during scan shift), so
// while the scan chain ripples the rest of the combinational logic sees a
// fixed vector and does not switch; gates fed only by primary inputs are not
// gated. IVC_VEC selects, per gate, the gating style and so the value seen
// during shift: bit g = 1 -> GND-gated, output held at 1; bit g = 0 ->
// VDD-gated, output held at 0. All ones is the plain gated-GND scheme;
// choosing IVC_VEC as the minimum-leakage vector of the logic behind the
// first level gives the mixed scheme. In hardware the gated gates of one style
// share one gating transistor; logically that is the common gc.
// Purely combinational.
// Gating, forced values and IVC follow the document. The benchmark netlists
// are not available, so the gate wiring is an example that stands in for the
// real first level of the target circuit: gate g has input A = cin[g mod N],
// input B = cin[(7g+3) mod N] (the next index if that equals A), N = N_PI +
// N_SFF, and its type cycles AND, OR, NAND, NOR with g.
module fls_first_level #(
  parameter int unsigned       N_PI    = 17,
  parameter int unsigned       N_SFF   = 74,
  parameter int unsigned       NUM_FL  = 160,
  parameter logic [NUM_FL-1:0] IVC_VEC = '1
) (
  input  logic [N_PI-1:0]   pi,
  input  logic [N_SFF-1:0]  sff_q,
  input  logic              gc,
  output logic [NUM_FL-1:0] fl_out
);
  import lpbist_pkg::*;

  localparam int unsigned N = N_PI + N_SFF;

  logic [N-1:0] cin;
  assign cin = {sff_q, pi};

  for (genvar g = 0; g < NUM_FL; g++) begin : g_gate
    localparam int unsigned IA  = g % N;
    localparam int unsigned IB0 = (7 * g + 3) % N;
    localparam int unsigned IB  = (IB0 == IA) ? (IA + 1) % N : IB0;
    localparam fl_gate_e    T   = fl_gate_e'(g % 4);
    localparam bit          GATED = (IA >= N_PI) || (IB >= N_PI);

    fls_gate #(
      .TYPE  (T),
      .GATING(IVC_VEC[g] ? GATE_GND : GATE_VDD)
    ) u_gate (
      .a (cin[IA]),
      .b (cin[IB]),
      .gc(GATED ? gc : 1'b1),
      .y (fl_out[g])
    );
  end

endmodule
