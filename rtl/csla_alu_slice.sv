// csla_alu_slice -- one N-bit slice (four bits by default) of the ALU-style
// carry select adder.
//
// Idea: a conventional carry select adder keeps two complete ripple-carry
// adders per group, one for carry-in 0 and one for carry-in 1, and a bank of
// multiplexers. This slice shares everything that does not depend on the
// carry-in: a single half adder row produces propagate (s0) and generate (c0)
// once, and only the carry chains are duplicated. The sum XOR is done once,
// after the right carries are selected.
//
// Dataflow (five units):
//   HSG  : s0 = a ^ b, c0 = a & b
//   CG0  : carry out of each bit assuming carry-in 0   (AND/OR ripple)
//   CG1  : carry out of each bit assuming carry-in 1   (AND/OR ripple)
//   CS   : c = cg0 | (cin & cg1); cout = c[N-1]
//   FSG  : sum = s0 ^ {c[N-2:0], cin}
//
// Interface: a, b (N bits), cin in; sum (N bits), cout out.
// Timing: purely combinational. Once a and b are stable, the path from cin
// to cout is a single AND/OR level, which is what makes chained slices fast.
//
// The five units and their order follow the design; the exact Boolean form
// of the carry generators and selector is this implementation's.
module csla_alu_slice #(
  parameter int unsigned N = csla_pkg::SLICE_W
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] s0, c0;        // half sum / half carry
  logic [N-1:0] c_cg0, c_cg1;  // carries assuming cin = 0 / 1
  logic [N-1:0] c;             // selected carries

  csla_hsg #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));

  csla_cg #(.N(N), .CARRY_IN(1'b0)) u_cg0 (.s0(s0), .c0(c0), .c(c_cg0));
  csla_cg #(.N(N), .CARRY_IN(1'b1)) u_cg1 (.s0(s0), .c0(c0), .c(c_cg1));

  csla_cs #(.N(N)) u_cs (.c_cg0(c_cg0), .c_cg1(c_cg1), .cin(cin), .c(c), .cout(cout));

  csla_fsg #(.N(N)) u_fsg (.s0(s0), .c(c), .cin(cin), .sum(sum));
endmodule
