// csla_hsg -- half sum generator (HSG) of the ALU-style carry select adder.
//
// Function: one half adder per bit. For every bit position i it forms the
// half sum s0[i] = a[i] ^ b[i] (the carry-propagate term) and the half carry
// c0[i] = a[i] & b[i] (the carry-generate term). Both feed the two carry
// generators; s0 also feeds the full sum generator.
//
// Interface: a, b (N bits) in; s0, c0 (N bits) out.
// Timing: purely combinational, one gate level (XOR / AND).
//
// The gate choice, one AND and one XOR per bit, follows the design; the
// width parameter is this implementation's.
module csla_hsg #(
  parameter int unsigned N = csla_pkg::SLICE_W
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);
  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end
endmodule
