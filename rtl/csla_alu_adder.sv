// csla_alu_adder -- WIDTH-bit ALU-style carry select adder (top level).
//
// The operands are cut into WIDTH/SLICE bit slices of csla_alu_slice. Each
// slice precomputes its carries for both possible carry-ins; the carry out
// of slice k is the carry-in of slice k+1, and the adder's carry-in enters
// slice 0. Because each slice only needs one AND/OR level to turn its
// carry-in into its carry out, the slice-to-slice chain is short.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out, with
// {cout, sum} = a + b + cin.
// Timing: purely combinational, no clock and no reset.
//
// Defaults: WIDTH = 8 and SLICE = 4, the two sizes the design is
// characterised at. Building the 8-bit adder from two chained 4-bit slices is
// this design's reading; WIDTH must be a multiple of SLICE.
module csla_alu_adder #(
  parameter int unsigned WIDTH = csla_pkg::ADDER_W,
  parameter int unsigned SLICE = csla_pkg::SLICE_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NSLICES = WIDTH / SLICE;

  if (SLICE == 0 || WIDTH % SLICE != 0) begin : g_bad_size
    $error("csla_alu_adder: WIDTH (%0d) must be a non-zero multiple of SLICE (%0d)",
           WIDTH, SLICE);
  end

  logic [NSLICES:0] carry;  // carry[k] = carry into slice k

  assign carry[0] = cin;

  for (genvar k = 0; k < NSLICES; k++) begin : g_slice
    csla_alu_slice #(.N(SLICE)) u_slice (
      .a   (a[k*SLICE +: SLICE]),
      .b   (b[k*SLICE +: SLICE]),
      .cin (carry[k]),
      .sum (sum[k*SLICE +: SLICE]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[NSLICES];
endmodule
