// tb_fls_first_level: self-checking test of fls_first_level (3 primary
// inputs, 5 scan flip-flops, 12 gates, mixed IVC vector).
// The reference rebuilds the example wiring (A = g mod 8, B = (7g+3) mod 8 or
// the next index, type AND/OR/NAND/NOR by g mod 4). With gc high every output
// must be its gate function; with gc low gates touching a scan flip-flop must
// show their IVC bit while gates fed only by primary inputs still compute.
module tb_fls_first_level;
  localparam int NPI = 3, NSFF = 5, NFL = 12, N = NPI + NSFF;
  localparam logic [NFL-1:0] IVC = 12'b1011_0011_1010;
  logic [NPI-1:0] pi;
  logic [NSFF-1:0] q;
  logic gc;
  logic [NFL-1:0] fl;
  int checks = 0, failures = 0, held = 0, ungated_seen = 0;

  fls_first_level #(.N_PI(NPI), .N_SFF(NSFF), .NUM_FL(NFL), .IVC_VEC(IVC)) dut (
    .pi, .sff_q(q), .gc, .fl_out(fl)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cin;
    logic exp_v, va, vb;
    int ia, ib;
    for (int v = 0; v < 512; v++) begin
      {gc, q, pi} = 9'(v);
      #1;
      cin = {q, pi};
      for (int g = 0; g < NFL; g++) begin
        ia = g % N;
        ib = (7 * g + 3) % N;
        if (ib == ia) ib = (ia + 1) % N;
        va = cin[ia]; vb = cin[ib];
        case (g % 4)
          0: exp_v = va & vb;
          1: exp_v = va | vb;
          2: exp_v = !(va & vb);
          default: exp_v = !(va | vb);
        endcase
        if (!gc && (ia >= NPI || ib >= NPI)) begin
          exp_v = IVC[g];
          held++;
        end else if (!gc) ungated_seen++;
        check(fl[g] == exp_v, $sformatf("v=%0d gate %0d: %b exp %b", v, g, fl[g], exp_v));
      end
    end
    check(held > 0 && ungated_seen > 0, "both gated and ungated gates exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
