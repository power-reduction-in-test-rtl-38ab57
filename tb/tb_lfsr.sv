// tb_lfsr: self-checking test of lfsr.
// Checks the 32-bit default instance against a reference step computed from
// the polynomial x^32+x^22+x^2+x+1 written out term by term, checks that en=0
// holds the state and that reset reloads the seed, and checks that a 4-bit
// instance with x^4+x^3+1 has the maximal period of 15.
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, en4 = 1'b0;
  logic [31:0] state;
  logic        sout;
  logic [3:0]  s4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut (.clk, .rst_n, .en, .state, .sout);
  lfsr #(.W(4), .TAPS(4'b1100), .SEED(4'b0001)) dut4 (.clk, .rst_n, .en(en4), .state(s4), .sout());

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

  logic [31:0] model;
  int period;
  initial begin
    repeat (2) @(posedge clk);
    check(state == 32'h1, "reset loads seed");
    rst_n = 1'b1;
    model = 32'h1;
    @(negedge clk);
    en = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      model = {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]};
      check(state == model, $sformatf("step %0d: %h vs %h", i, state, model));
      check(sout == model[31], "sout is MSB");
    end
    en = 1'b0;
    repeat (5) @(negedge clk);
    check(state == model, "hold with en=0");
    // period of the 4-bit instance
    en4 = 1'b1;
    period = 0;
    do begin @(negedge clk); period++; end while (s4 != 4'b0001 && period < 40);
    check(period == 15, $sformatf("4-bit period %0d", period));
    en4 = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    check(state == 32'h1 && s4 == 4'h1, "async reset reloads seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
