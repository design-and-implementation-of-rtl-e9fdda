// tb_csla_hsg -- self-checking testbench for the half sum generator.
//
// Applies every pair of 4-bit operands and checks, bit by bit, that the half
// sum and half carry equal the low and high bit of the arithmetic sum
// a[i] + b[i]. A watchdog ends the run with a failure if it hangs.
module tb_csla_hsg;
  localparam int unsigned N = 4;

  logic [N-1:0] a, b, s0, c0;
  int checks = 0, failures = 0;

  csla_hsg #(.N(N)) dut (.a(a), .b(b), .s0(s0), .c0(c0));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        #1;
        for (int i = 0; i < int'(N); i++) begin
          int bitsum;
          bitsum = int'(a[i]) + int'(b[i]);
          checks++;
          if (s0[i] != bitsum[0] || c0[i] != bitsum[1]) begin
            failures++;
            $display("FAIL a=%h b=%h bit %0d: s0=%b c0=%b", a, b, i, s0[i], c0[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
