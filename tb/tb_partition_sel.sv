// tb_partition_sel: self-checking test of partition_sel with K=3 and K=2.
// Random advance/clear; sel and the one-hot ctrl are compared each cycle
// with a reference counter that wraps at K.
module tb_partition_sel;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, advance = 1'b0;
  logic [1:0] sel3;
  logic [2:0] ctrl3;
  logic       sel2;
  logic [1:0] ctrl2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  partition_sel #(.K(3)) dut3 (.clk, .rst_n, .clear, .advance, .sel(sel3), .ctrl(ctrl3));
  partition_sel dut2 (.clk, .rst_n, .clear, .advance, .sel(sel2), .ctrl(ctrl2));

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

  int m3, m2, wraps;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m3 = 0; m2 = 0; wraps = 0;
    for (int i = 0; i < 500; i++) begin
      advance = ($urandom % 4) != 0;
      clear   = ($urandom % 23) == 0;
      @(negedge clk);
      if (clear) begin m3 = 0; m2 = 0; end
      else if (advance) begin
        if (m3 == 2) wraps++;
        m3 = (m3 + 1) % 3; m2 = (m2 + 1) % 2;
      end
      check(sel3 == 2'(m3) && ctrl3 == 3'(1 << m3), $sformatf("K=3 sel %0d ctrl %b exp %0d", sel3, ctrl3, m3));
      check(sel2 == 1'(m2) && ctrl2 == 2'(1 << m2), "K=2");
    end
    check(wraps > 10, "counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
