// csla_fsg -- full sum generator (FSG) of the ALU-style carry select adder.
//
// Function: the final sum bits. Bit i is the half sum s0[i] XORed with the
// carry into bit i: the slice carry-in for bit 0, the selected carry out of
// bit i-1 (from the carry selector) otherwise.
//
// Interface: s0, c (N bits), cin in; sum (N bits) out. c[N-1] is not used
// here; it leaves the slice as the carry out.
// Timing: purely combinational, one XOR level after the carry selector.
//
// One XOR per bit follows the design; the width parameter is this
// implementation's.
module csla_fsg #(
  parameter int unsigned N = csla_pkg::SLICE_W
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] sum
);
  logic [N:0] carries;  // {carry out of bit N-1 .. carry out of bit 0, cin}

  always_comb begin
    carries = {c, cin};
    sum     = s0 ^ carries[N-1:0];
  end
endmodule
