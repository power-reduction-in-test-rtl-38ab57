// tb_fls_gate: self-checking test of fls_gate.
// Every gate type in both gating styles is driven exhaustively: with gc
// high the output must be the gate's truth table, with gc low it must be 1
// for GND-gating and 0 for VDD-gating whatever the inputs.
module tb_fls_gate;
  import lpbist_pkg::*;
  logic a, b, gc;
  logic [5:0] y_gnd, y_vdd;
  int checks = 0, failures = 0;

  for (genvar t = 0; t < 6; t++) begin : g_t
    fls_gate #(.TYPE(fl_gate_e'(t)), .GATING(GATE_GND)) u_g (.a, .b, .gc, .y(y_gnd[t]));
    fls_gate #(.TYPE(fl_gate_e'(t)), .GATING(GATE_VDD)) u_v (.a, .b, .gc, .y(y_vdd[t]));
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] tt;
  initial begin
    for (int v = 0; v < 8; v++) begin
      {gc, a, b} = 3'(v);
      #1;
      // truth tables in the order AND, OR, NAND, NOR, BUF, INV
      tt = {~a, a, ~(a | b), ~(a & b), a | b, a & b};
      if (gc) begin
        check(y_gnd == tt, $sformatf("GND-gated active a=%b b=%b: %b", a, b, y_gnd));
        check(y_vdd == tt, $sformatf("VDD-gated active a=%b b=%b: %b", a, b, y_vdd));
      end else begin
        check(y_gnd == 6'b111111, "GND-gated held at 1");
        check(y_vdd == 6'b000000, "VDD-gated held at 0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
