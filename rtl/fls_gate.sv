// fls_gate: behavioural model of one first-level gate with First Level
// Supply gating (FLS). The real cell is a transistor-level circuit (a logic
// gate whose ground or supply path runs through a gating transistor, plus a
// pull-up or pull-down on its output); this module models its logic
// behaviour only.
//
// With gc high the gate computes its function TYPE of a and b (b unused for
// BUF/INV). With gc low its supply path is cut and its output is forced, so
// scan shifting cannot ripple into the logic behind it:
//   GATING = GATE_GND: ground path cut, output pulled up to 1;
//   GATING = GATE_VDD: supply path cut, output pulled down to 0.
// Purely combinational. The two gating styles, their forced values and the
// gating-control signal follow the document; reading "gated" as gc low
// follows from the pull-up being a PMOS driven by gc. The set of gate types
// is this design's choice.
module fls_gate #(
  parameter lpbist_pkg::fl_gate_e TYPE   = lpbist_pkg::G_NAND,
  parameter lpbist_pkg::gating_e  GATING = lpbist_pkg::GATE_GND
) (
  input  logic a,
  input  logic b,
  input  logic gc,
  output logic y
);
  import lpbist_pkg::*;

  always_comb begin
    if (gc) y = gate_eval(TYPE, a, b);
    else    y = (GATING == GATE_GND);
  end

endmodule
