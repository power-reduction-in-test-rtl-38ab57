// tb_misr: self-checking test of misr.
// Random inputs are compacted by the default 32-bit, 6-input instance and by
// a 4-bit, 6-input instance (inputs folded); the signatures are compared each
// cycle with a reference that shifts, applies the feedback polynomial and
// XORs each input into its stage. Also checks en=0 (hold) and clear.
module tb_misr;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clear = 1'b0;
  logic [5:0]  din;
  logic [31:0] sig;
  logic [3:0]  sig4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr dut (.clk, .rst_n, .clear, .en, .din, .signature(sig));
  misr #(.W(4), .N_IN(6), .TAPS(4'b1100)) dut4 (.clk, .rst_n, .clear, .en, .din, .signature(sig4));

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

  logic [31:0] m;
  logic [3:0]  m4;
  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    check(sig == 0 && sig4 == 0, "reset clears");
    rst_n = 1'b1;
    m = '0; m4 = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      din = 6'($urandom);
      en  = ($urandom % 4) != 0;
      @(negedge clk) ;
      // nothing: one cycle with the new din applied, compare after it
      if (en) begin
        m  = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]} ^ {26'b0, din};
        m4 = {m4[2:0], m4[3] ^ m4[2]} ^ din[3:0] ^ {2'b0, din[5:4]};
      end
      check(sig == m, $sformatf("sig %0d: %h vs %h", i, sig, m));
      check(sig4 == m4, $sformatf("sig4 %0d: %h vs %h", i, sig4, m4));
      en = 1'b0;
    end
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(sig == 0 && sig4 == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
