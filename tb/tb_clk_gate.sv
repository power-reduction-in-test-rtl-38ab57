// tb_clk_gate: self-checking test of clk_gate.
// Drives a random enable that changes at random points inside the clock
// period and checks that gclk is low whenever clk is low, that a rising
// edge of clk reaches gclk exactly when en was high just before that edge,
// and that gclk never rises or falls except together with clk.
`timescale 1ns/1ps
module tb_clk_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int edges = 0, exp_edges = 0;
  logic en_at_edge;

  always #5 clk = ~clk;

  clk_gate dut (.clk, .en, .gclk);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // enable toggles at random instants, including while clk is high
  initial begin
    forever begin
      @(clk);
      #($urandom_range(1, 4));
      #0.5;
      en = 1'($urandom);
    end
  end

  always @(posedge clk) begin
    en_at_edge = en;
    if (en) exp_edges++;
    #1;
    check(gclk == en_at_edge, "gclk follows en sampled before the edge");
  end
  always @(posedge gclk) begin
    edges++;
    check(clk == 1'b1, "gclk rises only with clk");
  end
  always @(gclk) if (gclk == 1'b1) check(clk, "gclk high only while clk high");
  always @(negedge clk) begin
    #0.1;
    check(gclk == 1'b0, "gclk low while clk low");
  end

  initial begin
    #10000;
    check(edges == exp_edges, $sformatf("edge count %0d vs %0d", edges, exp_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
