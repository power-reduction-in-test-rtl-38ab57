// tb_lp_bist_top: end-to-end test of lp_bist_top at reduced sizes.
// Two instances run side by side: K=2 partitions (the main configuration)
// and K=3, each with 4 primary inputs, 3 primary outputs, 7 scan flip-flops,
// 12 first-level gates with a mixed IVC vector and 6 patterns. Each is
// checked by lp_bist_checker against the golden model in lp_bist_env.
module tb_lp_bist_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fin2, fin3;
  int ch2, ch3, fl2, fl3;

  lp_bist_bench #(.K(2)) u_b2 (.clk, .finished(fin2), .checks(ch2), .failures(fl2));
  lp_bist_bench #(.K(3)) u_b3 (.clk, .finished(fin3), .checks(ch3), .failures(fl3));

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch2 + ch3, fl2 + fl3 + 1);
    $finish;
  end

  initial begin
    wait (fin2 && fin3);
    $display("TB_RESULT checks=%0d failures=%0d", ch2 + ch3, fl2 + fl3);
    $finish;
  end
endmodule
