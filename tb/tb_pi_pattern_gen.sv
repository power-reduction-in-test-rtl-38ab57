// tb_pi_pattern_gen: self-checking test of pi_pattern_gen (NUM_PI=7, K=3:
// partitions of 3, 2 and 2 inputs).
// A reference LFSR (x^32+x^22+x^2+x+1, same seed) steps on every load; on a
// load of partition p its bits j are expected from stage j, and all other
// partitions must keep their values.
module tb_pi_pattern_gen;
  localparam int NPI = 7, K = 3;
  localparam int OFFS [K] = '{0, 3, 5};
  localparam int LENS [K] = '{3, 2, 2};
  logic clk = 1'b0, rst_n = 1'b0;
  logic [K-1:0] load;
  logic [NPI-1:0] pi, model;
  logic [31:0] r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pi_pattern_gen #(.NUM_PI(NPI), .K(K)) dut (.clk, .rst_n, .load, .pi);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = '0;
    repeat (2) @(negedge clk);
    check(pi == 0, "reset");
    rst_n = 1'b1;
    model = '0;
    r = 32'h1ACE_B00C;
    for (int i = 0; i < 300; i++) begin
      int p;
      p = $urandom % (K + 1);      // p == K: no load
      load = (p < K) ? K'(1 << p) : '0;
      @(negedge clk);
      if (p < K) begin
        for (int j = 0; j < LENS[p]; j++) model[OFFS[p] + j] = r[j];
        r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      end
      check(pi == model, $sformatf("cycle %0d load %b: pi %b exp %b", i, load, pi, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
