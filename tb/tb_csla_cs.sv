// tb_csla_cs -- self-checking testbench for the carry selector.
//
// Applies every pair of carry vectors that the two carry generators can
// produce together (a carry present with carry-in 0 is also present with
// carry-in 1) and both carry-in values, and checks that the selected vector
// is the CG1 vector when cin is 1 and the CG0 vector when cin is 0, and that
// cout is its top bit.
module tb_csla_cs;
  localparam int unsigned N = 4;

  logic [N-1:0] c_cg0, c_cg1, c;
  logic         cin, cout;
  int checks = 0, failures = 0;

  csla_cs #(.N(N)) dut (.c_cg0(c_cg0), .c_cg1(c_cg1), .cin(cin), .c(c), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i0 = 0; i0 < (1 << N); i0++)
      for (int i1 = 0; i1 < (1 << N); i1++)
        for (int ci = 0; ci < 2; ci++) begin
          logic [N-1:0] expected;
          if ((i0 & ~i1) != 0) continue;  // not a reachable pair
          c_cg0 = N'(i0);
          c_cg1 = N'(i1);
          cin   = ci[0];
          #1;
          expected = (ci == 1) ? N'(i1) : N'(i0);
          checks++;
          if (c !== expected || cout !== expected[N-1]) begin
            failures++;
            $display("FAIL cg0=%b cg1=%b cin=%0d: c=%b cout=%b", c_cg0, c_cg1, ci, c, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
