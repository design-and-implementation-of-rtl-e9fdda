// csla_cg -- carry generator (CG0 / CG1) of the ALU-style carry select adder.
//
// Function: computes, for every bit position, the carry out of that bit on
// the assumption that the slice's carry-in is CARRY_IN. The slice holds two
// of these side by side: CG0 (CARRY_IN = 0) and CG1 (CARRY_IN = 1), so both
// possible carry vectors are ready before the real carry-in arrives.
//
// How: a ripple of one AND and one OR per bit,
//   c[i] = c0[i] | (s0[i] & c[i-1]),   c[-1] = CARRY_IN,
// where s0 / c0 are the half sum (propagate) and half carry (generate) from
// the half sum generator. With CARRY_IN = 0 bit 0 reduces to c0[0]; with
// CARRY_IN = 1 it reduces to c0[0] | s0[0].
//
// Interface: s0, c0 (N bits) in; c (N bits) out, c[i] = carry out of bit i.
// Timing: purely combinational; the ripple is N AND/OR pairs deep.
//
// The use of AND and OR gates for the carry generators follows the design;
// the exact recurrence and the single shared module for CG0 and CG1 are this
// implementation's.
module csla_cg #(
  parameter int unsigned N        = csla_pkg::SLICE_W,
  parameter bit          CARRY_IN = 1'b0
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c
);
  always_comb begin
    logic carry;
    carry = CARRY_IN;
    for (int i = 0; i < int'(N); i++) begin
      carry = c0[i] | (s0[i] & carry);
      c[i]  = carry;
    end
  end
endmodule
