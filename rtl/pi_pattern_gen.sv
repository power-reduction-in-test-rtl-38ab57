// pi_pattern_gen: primary-input pattern source with per-partition control
// (the LFSR driven by CtrlA/CtrlB next to primary-input partitions I, II).
//
// The NUM_PI primary inputs are split into K contiguous partitions
// (lpbist_pkg::part_len/part_off). Each partition is a hold register: when
// load[p] is high at a rising edge, partition p takes fresh bits from the
// LFSR (bit j of the partition from LFSR stage j mod W) and the LFSR steps;
// the other partitions keep their values, so only one partition of the
// primary inputs switches at a time. Outputs are registered; reset
// (asynchronous, active low) clears them and seeds the LFSR.
// The per-partition control of the pattern source follows the document; the
// hold-register structure, bit mapping and seed are this design's choices.
module pi_pattern_gen #(
  parameter int unsigned  NUM_PI = 17,
  parameter int unsigned  K      = 2,
  parameter int unsigned  W      = 32,
  parameter logic [W-1:0] SEED   = W'(32'h1ACE_B00C)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [K-1:0]      load,
  output logic [NUM_PI-1:0] pi
);
  import lpbist_pkg::*;

  logic [W-1:0] rnd;

  lfsr #(.W(W), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en(|load), .state(rnd), .sout()
  );

  for (genvar i = 0; i < NUM_PI; i++) begin : g_bit
    localparam int unsigned P = part_of(NUM_PI, K, i);
    localparam int unsigned J = i - part_off(NUM_PI, K, P);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       pi[i] <= 1'b0;
      else if (load[P]) pi[i] <= rnd[J % W];
    end
  end

endmodule
