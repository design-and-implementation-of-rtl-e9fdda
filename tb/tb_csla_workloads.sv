// tb_csla_workloads -- runs the two adder sizes the design is characterised
// at: a 4-bit adder (one slice) and an 8-bit adder (two chained slices).
//
// Each is checked exhaustively over a, b and cin against the integer sum
// a + b + cin. The 4-bit case is also run on the default 8-bit adder with
// the operands zero-extended, to show that the default build carries 4-bit
// additions too.
module tb_csla_workloads;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic       cin, co4, co8;

  csla_alu_adder #(.WIDTH(4), .SLICE(4)) add4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  csla_alu_adder #(.WIDTH(8), .SLICE(4)) add8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(co8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 4-bit workload on the 4-bit build and on the 8-bit build.
    for (int ia = 0; ia < 16; ia++)
      for (int ib = 0; ib < 16; ib++)
        for (int ci = 0; ci < 2; ci++) begin
          int expected;
          a4 = 4'(ia); b4 = 4'(ib); a8 = 8'(ia); b8 = 8'(ib); cin = ci[0];
          #1;
          expected = ia + ib + ci;
          checks += 2;
          if ({co4, s4} != 5'(expected)) begin
            failures++;
            $display("FAIL 4-bit a=%h b=%h cin=%0d: %b %h", a4, b4, ci, co4, s4);
          end
          if ({co8, s8} != 9'(expected)) begin
            failures++;
            $display("FAIL 4-bit on 8-bit a=%h b=%h cin=%0d: %b %h", a8, b8, ci, co8, s8);
          end
        end
    // 8-bit workload.
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++)
        for (int ci = 0; ci < 2; ci++) begin
          int expected;
          a8 = 8'(ia); b8 = 8'(ib); cin = ci[0];
          #1;
          expected = ia + ib + ci;
          checks++;
          if ({co8, s8} != 9'(expected)) begin
            failures++;
            $display("FAIL 8-bit a=%h b=%h cin=%0d: %b %h", a8, b8, ci, co8, s8);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
