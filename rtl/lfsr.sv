// lfsr: pseudo-random pattern generator of the test-per-scan BIST.
//
// A Fibonacci linear feedback shift register: when en is high the register
// shifts towards the MSB and the XOR of the stages selected by TAPS enters
// stage 0. state gives all stages in parallel (used for the primary-input
// patterns), sout the MSB as a serial stream (used as scan-in data).
// Asynchronous active-low reset loads SEED, which must be non-zero.
// Timing: one step per enabled rising clock edge, outputs are registered.
// The document only names the LFSR as the pattern source; width, polynomial
// and seed are this design's choices (x^32+x^22+x^2+x+1 by default).
module lfsr #(
  parameter int unsigned W     = 32,
  parameter logic [W-1:0] TAPS = lpbist_pkg::POLY32[W-1:0],
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] state,
  output logic         sout
);

  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[W-2:0], ^(state & TAPS)};
  end

  assign sout = state[W-1];

endmodule
