// tb_scan_chain: self-checking test of scan_chain (LEN=5 and LEN=1).
// Shifts random bits in and compares every cell and the scan-out with a
// reference shift register, then checks that capture loads d in one cycle
// and that a capture followed by LEN shifts brings the captured bits out
// on so in order.
module tb_scan_chain;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, si = 1'b0;
  logic [L-1:0] d, q, model;
  logic so, q1, so1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_chain #(.LEN(L)) dut (.clk, .rst_n, .shift_en, .si, .d, .q, .so);
  scan_chain #(.LEN(1)) dut1 (.clk, .rst_n, .shift_en, .si, .d(d[0]), .q(q1), .so(so1));

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

  logic [L-1:0] cap;
  logic m1;
  initial begin
    d = '0;
    repeat (2) @(negedge clk);
    check(q == 0, "reset");
    rst_n = 1'b1;
    model = '0; m1 = 1'b0;
    for (int r = 0; r < 20; r++) begin
      // shift phase
      shift_en = 1'b1;
      for (int i = 0; i < 8; i++) begin
        si = 1'($urandom);
        d  = L'($urandom);
        @(negedge clk);
        model = {model[L-2:0], si};
        m1 = si;
        check(q == model, $sformatf("shift q=%b exp %b", q, model));
        check(so == model[L-1], "so");
        check(q1 == m1 && so1 == m1, "LEN=1 shift");
      end
      // capture
      shift_en = 1'b0;
      d = L'($urandom);
      cap = d;
      @(negedge clk);
      check(q == cap, $sformatf("capture q=%b exp %b", q, cap));
      check(q1 == cap[0], "LEN=1 capture");
      model = cap;
      // unload the captured bits
      shift_en = 1'b1;
      si = 1'b0;
      for (int i = 0; i < L; i++) begin
        check(so == cap[L-1-i], $sformatf("unload bit %0d", i));
        @(negedge clk);
        model = {model[L-2:0], 1'b0};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
