// tb_lp_bist_iscas: lp_bist_top sized for each ISCAS89 benchmark of the
// evaluation (scan flip-flops and first-level gates as reported for the
// benchmarks; primary input/output counts of the standard circuits), with
// k=2 and k=3 partitions, 16 patterns each. The benchmark logic is replaced
// by the model in lp_bist_env; each instance must produce the golden
// signature with one partition clocked per cycle and FLS holding the IVC
// vector during shift.
module tb_lp_bist_iscas;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 12;
  logic fin [NB];
  int ch [NB];
  int fl [NB];

  //                     K  PI  PO   SFF   FL  patterns
  lp_bist_bench #(.K(2), .NPI(17), .NPO(5),   .NSFF(74),   .NFL(160),  .NP(16)) s1423_k2   (.clk, .finished(fin[0]),  .checks(ch[0]),  .failures(fl[0]));
  lp_bist_bench #(.K(3), .NPI(17), .NPO(5),   .NSFF(74),   .NFL(160),  .NP(16)) s1423_k3   (.clk, .finished(fin[1]),  .checks(ch[1]),  .failures(fl[1]));
  lp_bist_bench #(.K(2), .NPI(35), .NPO(49),  .NSFF(179),  .NFL(280),  .NP(16)) s5378_k2   (.clk, .finished(fin[2]),  .checks(ch[2]),  .failures(fl[2]));
  lp_bist_bench #(.K(3), .NPI(35), .NPO(49),  .NSFF(179),  .NFL(280),  .NP(16)) s5378_k3   (.clk, .finished(fin[3]),  .checks(ch[3]),  .failures(fl[3]));
  lp_bist_bench #(.K(2), .NPI(36), .NPO(39),  .NSFF(211),  .NFL(445),  .NP(16)) s9234_k2   (.clk, .finished(fin[4]),  .checks(ch[4]),  .failures(fl[4]));
  lp_bist_bench #(.K(3), .NPI(36), .NPO(39),  .NSFF(211),  .NFL(445),  .NP(16)) s9234_k3   (.clk, .finished(fin[5]),  .checks(ch[5]),  .failures(fl[5]));
  lp_bist_bench #(.K(2), .NPI(62), .NPO(152), .NSFF(638),  .NFL(729),  .NP(16)) s13207_k2  (.clk, .finished(fin[6]),  .checks(ch[6]),  .failures(fl[6]));
  lp_bist_bench #(.K(3), .NPI(62), .NPO(152), .NSFF(638),  .NFL(729),  .NP(16)) s13207_k3  (.clk, .finished(fin[7]),  .checks(ch[7]),  .failures(fl[7]));
  lp_bist_bench #(.K(2), .NPI(77), .NPO(150), .NSFF(534),  .NFL(837),  .NP(16)) s15850_k2  (.clk, .finished(fin[8]),  .checks(ch[8]),  .failures(fl[8]));
  lp_bist_bench #(.K(3), .NPI(77), .NPO(150), .NSFF(534),  .NFL(837),  .NP(16)) s15850_k3  (.clk, .finished(fin[9]),  .checks(ch[9]),  .failures(fl[9]));
  lp_bist_bench #(.K(2), .NPI(35), .NPO(320), .NSFF(1728), .NFL(2692), .NP(16)) s35932_k2  (.clk, .finished(fin[10]), .checks(ch[10]), .failures(fl[10]));
  lp_bist_bench #(.K(3), .NPI(35), .NPO(320), .NSFF(1728), .NFL(2692), .NP(16)) s35932_k3  (.clk, .finished(fin[11]), .checks(ch[11]), .failures(fl[11]));

  function automatic void report(input int extra);
    int c = 0, f = extra;
    for (int i = 0; i < NB; i++) begin c += ch[i]; f += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog");
    report(1);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) wait (fin[i]);
    report(0);
    $finish;
  end
endmodule
