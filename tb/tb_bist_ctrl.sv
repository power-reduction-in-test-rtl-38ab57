// tb_bist_ctrl: self-checking test of bist_ctrl (K=3, NUM_SFF=7, 4 patterns,
// partitions of 3, 2 and 2 flip-flops).
// The expected control sequence is generated by nested loops (pattern,
// partition, shift cycle; then one capture cycle per partition; finally one
// unload pass) and compared cycle by cycle with shift_en, capture,
// part_ctrl, pi_load, the LFSR and MISR enables (MISR off during the first
// load) and busy. The session length
// (NUM_PATTERNS+1)*NUM_SFF + NUM_PATTERNS*K is checked, then done, and a
// second session is started to check the restart.
module tb_bist_ctrl;
  localparam int K = 3, NSFF = 7, NP = 4;
  localparam int LENS [K] = '{3, 2, 2};
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic shift_en, capture, scan_lfsr_en, misr_en, misr_clear, busy, done;
  logic [K-1:0] part_ctrl, pi_load;
  logic [31:0] pattern;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_ctrl #(.K(K), .NUM_SFF(NSFF), .NUM_PATTERNS(NP)) dut (
    .clk, .rst_n, .start, .shift_en, .capture, .part_ctrl, .pi_load,
    .scan_lfsr_en, .misr_en, .misr_clear, .busy, .done, .pattern
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input logic sh, input logic cap, input logic [K-1:0] pc,
                              input logic [K-1:0] pl, input logic me, input string tag);
    check(shift_en == sh && capture == cap && part_ctrl == pc && pi_load == pl
          && scan_lfsr_en == sh && misr_en == me && busy == (sh | cap) && !done,
          $sformatf("%s: sh=%b cap=%b pc=%b pl=%b", tag, shift_en, capture, part_ctrl, pi_load));
    @(negedge clk);
  endtask

  task automatic run_session();
    int cycles;
    cycles = 0;
    start = 1'b1;
    #1;
    check(misr_clear, "misr_clear with start");
    @(negedge clk);
    start = 1'b0;
    for (int pat = 0; pat <= NP; pat++) begin
      for (int p = 0; p < K; p++)
        for (int c = 0; c < LENS[p]; c++) begin
          expect_cycle(1'b1, 1'b0, K'(1 << p), (c == 0 && pat < NP) ? K'(1 << p) : '0, pat > 0,
                       $sformatf("pat %0d shift p%0d c%0d", pat, p, c));
          cycles++;
        end
      if (pat < NP)
        for (int p = 0; p < K; p++) begin
          expect_cycle(1'b0, 1'b1, K'(1 << p), '0, 1'b1, $sformatf("pat %0d capture p%0d", pat, p));
          cycles++;
        end
    end
    check(cycles == (NP + 1) * NSFF + NP * K, "session length");
    check(done && !busy && part_ctrl == 0, "done after session");
    check(pattern == NP, "pattern count");
    repeat (3) @(negedge clk);
    check(done && !busy, "done holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && part_ctrl == 0, "idle after reset");
    run_session();
    run_session();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
