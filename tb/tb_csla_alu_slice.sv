// tb_csla_alu_slice -- self-checking testbench for one 4-bit adder slice.
//
// Exhaustive: every a, b and cin (512 cases). {cout, sum} is compared with
// the integer a + b + cin. Also counts the cases where the carry-in changes
// the carry out (the carry selector really has to choose), and fails if
// there were none.
module tb_csla_alu_slice;
  localparam int unsigned N = 4;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0, cin_decides = 0;

  csla_alu_slice #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << N); ia++)
      for (int ib = 0; ib < (1 << N); ib++)
        for (int ci = 0; ci < 2; ci++) begin
          int expected;
          a = N'(ia); b = N'(ib); cin = ci[0];
          #1;
          expected = ia + ib + ci;
          if (ci == 1 && ia + ib == (1 << N) - 1) cin_decides++;
          checks++;
          if ({cout, sum} != (N + 1)'(expected)) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%0d: cout=%b sum=%h, want %h", a, b, ci, cout, sum, expected);
          end
        end
    if (cin_decides == 0) begin
      failures++;
      $display("FAIL carry-in never decided the carry out");
    end
    $display("slice: carry-in decided carry out in %0d cases", cin_decides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
