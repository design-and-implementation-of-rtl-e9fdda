// tb_csla_fsg -- self-checking testbench for the full sum generator.
//
// Applies every combination of half sums, selected carries and carry-in for
// a 4-bit slice and checks each sum bit against s0[i] XOR the carry into bit
// i (cin for bit 0, c[i-1] above).
module tb_csla_fsg;
  localparam int unsigned N = 4;

  logic [N-1:0] s0, c, sum;
  logic         cin;
  int checks = 0, failures = 0;

  csla_fsg #(.N(N)) dut (.s0(s0), .c(c), .cin(cin), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int is = 0; is < (1 << N); is++)
      for (int icc = 0; icc < (1 << N); icc++)
        for (int ci = 0; ci < 2; ci++) begin
          s0  = N'(is);
          c   = N'(icc);
          cin = ci[0];
          #1;
          for (int i = 0; i < int'(N); i++) begin
            bit carry_in_bit, expected;
            carry_in_bit = (i == 0) ? cin : c[i-1];
            expected     = (s0[i] != carry_in_bit);
            checks++;
            if (sum[i] != expected) begin
              failures++;
              $display("FAIL s0=%b c=%b cin=%0d bit %0d: sum=%b", s0, c, ci, i, sum[i]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
