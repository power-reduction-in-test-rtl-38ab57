// tb_lp_bist_full: one complete BIST session of lp_bist_top at its default
// sizes (17 primary inputs, 5 primary outputs, 74 scan flip-flops in two
// partitions, 160 first-level gates, 1024 patterns), preceded and followed by
// normal-mode operation. The circuit under test and the golden signature
// come from lp_bist_env, the cycle-by-cycle checks from lp_bist_checker.
module tb_lp_bist_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, test_mode, bist_start, bist_busy, bist_done, shift_en;
  logic [16:0] func_pi, cut_pi;
  logic [4:0] cut_po;
  logic [73:0] cut_next_state, state_q;
  logic [159:0] fl_out;
  logic [31:0] signature, sig_exp;
  logic [1:0] part_ctrl, pclk, scan_out;
  int cycles_exp;
  logic finished;
  int checks, failures;

  lp_bist_top dut (.*);

  assign pclk = {dut.g_part[1].pclk, dut.g_part[0].pclk};

  lp_bist_env env (.*);

  lp_bist_checker chk (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
