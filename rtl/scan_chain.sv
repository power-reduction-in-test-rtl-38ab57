// scan_chain: one scan partition (scan chain A, B, ...) of the BIST.
//
// LEN scan flip-flops, each preceded by a multiplexer: with shift_en high the
// chain shifts (si enters q[0], q[i] moves to q[i+1], so is q[LEN-1]); with
// shift_en low every cell captures its next-state bit d[i] from the
// combinational block. The chain is clocked by its own gated partition clock
// (clk here), so it does not move at all while another partition is active.
// Asynchronous active-low reset clears the cells (this design's choice).
// The mux-plus-flip-flop scan cell and the per-partition clock, scan-in and
// scan-out follow the document; shift direction and reset are choices here.
module scan_chain #(
  parameter int unsigned LEN = 37
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           si,
  input  logic [LEN-1:0] d,
  output logic [LEN-1:0] q,
  output logic           so
);

  logic [LEN-1:0] shifted;

  if (LEN == 1) begin : g_one
    assign shifted = si;
  end else begin : g_many
    assign shifted = {q[LEN-2:0], si};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= shift_en ? shifted : d;
  end

  assign so = q[LEN-1];

endmodule
