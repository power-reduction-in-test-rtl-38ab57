// misr: multiple input signature register compacting the test responses.
//
// Each enabled cycle the register steps like a Fibonacci LFSR (polynomial
// TAPS) and the N_IN parallel inputs are XORed in, input i into stage
// i mod W. In the BIST top the inputs are the primary outputs of the circuit
// under test and the scan-out bit of the active scan partition.
// clear (synchronous) zeroes the signature at the start of a session; reset
// is asynchronous active-low to zero. One compaction per enabled rising edge.
// The document gives the MISR's role only; polynomial, width and input
// folding are this design's choices.
module misr #(
  parameter int unsigned W     = 32,
  parameter int unsigned N_IN  = 6,
  parameter logic [W-1:0] TAPS = lpbist_pkg::POLY32[W-1:0]
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [N_IN-1:0] din,
  output logic [W-1:0]    signature
);

  logic [W-1:0] folded;

  always_comb begin
    folded = '0;
    for (int unsigned i = 0; i < N_IN; i++)
      folded[i % W] ^= din[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      signature <= '0;
    else if (clear)  signature <= '0;
    else if (en)     signature <= {signature[W-2:0], ^(signature & TAPS)} ^ folded;
  end

endmodule
