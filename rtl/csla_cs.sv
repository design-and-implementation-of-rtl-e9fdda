// csla_cs -- carry selector (CS) of the ALU-style carry select adder.
//
// Function: once the slice carry-in is known, chooses per bit between the
// carry vector of CG0 (carry-in assumed 0) and of CG1 (carry-in assumed 1).
// The top selected carry is the slice's carry out.
//
// How: one AND and one OR per bit, c = c_cg0 | (cin & c_cg1). This equals a
// 2:1 multiplexer because a carry that occurs with carry-in 0 also occurs
// with carry-in 1 (c_cg0 implies c_cg1), so no inverter is needed.
//
// Interface: c_cg0, c_cg1 (N bits), cin in; c (N bits), cout out.
// Timing: purely combinational, one AND/OR level after cin. An assertion
// checks that every CG0 carry is also a CG1 carry.
//
// Selection by the carry-in with AND and OR gates follows the design; the
// exact AND-OR form is this implementation's.
module csla_cs #(
  parameter int unsigned N = csla_pkg::SLICE_W
) (
  input  logic [N-1:0] c_cg0,
  input  logic [N-1:0] c_cg1,
  input  logic         cin,
  output logic [N-1:0] c,
  output logic         cout
);
  always_comb begin
    c    = c_cg0 | ({N{cin}} & c_cg1);
    cout = c[N-1];
  end

  // The AND-OR form is only a multiplexer if CG0 never reports a carry that
  // CG1 does not; the carry generators guarantee this.
  always_comb begin
    assert final ((c_cg0 & ~c_cg1) == '0)
      else $error("csla_cs: CG0 carry %b not covered by CG1 carry %b", c_cg0, c_cg1);
  end
endmodule
