// partition_sel: modulo-K counter and decoder generating the partition
// controls (CtrlA, CtrlB, ... of the modified scan architecture).
//
// sel counts 0..K-1 and wraps; it steps on each rising edge with advance high
// and returns to 0 with clear (clear wins). ctrl is the one-hot decode of
// sel, so exactly one partition is selected at any time. Reset is
// asynchronous active-low to partition 0. The counter-plus-decoder structure
// is the document's (a modulo-2 counter for two partitions); generalising it
// to K partitions and the clear input are this design's choices.
module partition_sel #(
  parameter int unsigned K = 2,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          advance,
  output logic [SW-1:0] sel,
  output logic [K-1:0]  ctrl
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sel <= '0;
    else if (clear)   sel <= '0;
    else if (advance) sel <= (sel == SW'(K - 1)) ? '0 : sel + 1'b1;
  end

  always_comb begin
    ctrl = '0;
    ctrl[sel] = 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(ctrl));

endmodule
