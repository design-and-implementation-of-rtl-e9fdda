// tb_csla_cg -- self-checking testbench for the carry generators CG0 / CG1.
//
// Two instances, carry-in assumed 0 and 1, are fed from the half sum and half
// carry of every pair of N-bit operands. Each carry bit i is compared with
// the carry out of bit i of the integer sum a + b + CARRY_IN, i.e. bit i+1 of
// (a mod 2^(i+1)) + (b mod 2^(i+1)) + CARRY_IN. Runs at N = 4 (the slice
// width) and N = 6 to exercise a longer ripple.
module tb_csla_cg;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, c4_0, c4_1;
  logic [5:0] a6, b6, c6_0, c6_1;

  csla_cg #(.N(4), .CARRY_IN(1'b0)) cg0_4 (.s0(a4 ^ b4), .c0(a4 & b4), .c(c4_0));
  csla_cg #(.N(4), .CARRY_IN(1'b1)) cg1_4 (.s0(a4 ^ b4), .c0(a4 & b4), .c(c4_1));
  csla_cg #(.N(6), .CARRY_IN(1'b0)) cg0_6 (.s0(a6 ^ b6), .c0(a6 & b6), .c(c6_0));
  csla_cg #(.N(6), .CARRY_IN(1'b1)) cg1_6 (.s0(a6 ^ b6), .c0(a6 & b6), .c(c6_1));

  function automatic bit ref_carry(int a, int b, int cin, int i);
    int mask, t;
    mask = (1 << (i + 1)) - 1;
    t    = (a & mask) + (b & mask) + cin;
    return bit'(t >> (i + 1));
  endfunction

  task automatic check(int n, int a, int b, int cin, logic [5:0] got);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] != ref_carry(a, b, cin, i)) begin
        failures++;
        $display("FAIL N=%0d cin=%0d a=%h b=%h bit %0d got %b", n, cin, a, b, i, got[i]);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++)
      for (int ib = 0; ib < 16; ib++) begin
        a4 = 4'(ia); b4 = 4'(ib);
        #1;
        check(4, ia, ib, 0, {2'b00, c4_0});
        check(4, ia, ib, 1, {2'b00, c4_1});
      end
    for (int ia = 0; ia < 64; ia++)
      for (int ib = 0; ib < 64; ib++) begin
        a6 = 6'(ia); b6 = 6'(ib);
        #1;
        check(6, ia, ib, 0, c6_0);
        check(6, ia, ib, 1, c6_1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
