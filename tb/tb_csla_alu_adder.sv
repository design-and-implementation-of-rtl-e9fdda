// tb_csla_alu_adder -- end-to-end testbench for the adder at its default size
// (8 bits, two 4-bit slices).
//
// Exhaustive over a, b and cin (131072 cases); {cout, sum} is compared with
// the integer a + b + cin. It also counts how often each mechanism of the
// design was exercised and fails if any never happened:
//   - carry-in 1 selected (CG1 carries used in slice 0),
//   - a carry passed from slice 0 to slice 1 (slice 1 uses its CG1 carries),
//   - a carry out of the whole adder,
//   - a carry generated in slice 0 and propagated through every bit of
//     slice 1 (the longest path: all of slice 1 in propagate mode).
module tb_csla_alu_adder;
  localparam int unsigned W = csla_pkg::ADDER_W;
  localparam int unsigned S = csla_pkg::SLICE_W;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_cin1 = 0, n_slice_carry = 0, n_cout = 0, n_full_propagate = 0;

  csla_alu_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << W); ia++)
      for (int ib = 0; ib < (1 << W); ib++)
        for (int ci = 0; ci < 2; ci++) begin
          longint expected, low;
          a = W'(ia); b = W'(ib); cin = ci[0];
          #1;
          expected = longint'(ia) + longint'(ib) + longint'(ci);
          low      = longint'(ia % (1 << S)) + longint'(ib % (1 << S)) + longint'(ci);
          checks++;
          if ({cout, sum} != (W + 1)'(expected)) begin
            failures++;
            $display("FAIL a=%h b=%h cin=%0d: cout=%b sum=%h, want %h", a, b, ci, cout, sum, expected);
          end
          if (ci == 1) n_cin1++;
          if (low >= (1 << S)) begin
            n_slice_carry++;
            if (((ia ^ ib) >> S) == (1 << (W - S)) - 1) n_full_propagate++;
          end
          if (expected >= (1 << W)) n_cout++;
        end
    if (n_cin1 == 0)           begin failures++; $display("FAIL carry-in 1 never applied"); end
    if (n_slice_carry == 0)    begin failures++; $display("FAIL no carry between slices"); end
    if (n_cout == 0)           begin failures++; $display("FAIL no carry out"); end
    if (n_full_propagate == 0) begin failures++; $display("FAIL no full propagate"); end
    $display("mechanisms: cin=1 %0d, slice carry %0d, carry out %0d, full propagate %0d",
             n_cin1, n_slice_carry, n_cout, n_full_propagate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
