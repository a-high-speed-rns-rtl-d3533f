// trc_cell: two-rail checker cell, combines two 1-out-of-2 codes into one.
//
// Inputs a and b are two-rail pairs (valid when the two bits differ).
//   z[1] = a[1] b[0] | a[0] b[1],   z[0] = a[1] b[1] | a[0] b[0]
// If both inputs are valid the output is valid; if either is 00 or 11 the output
// is 00 or 11.  Purely combinational.  This standard cell is this design's choice
// for combining the channel codes.
module trc_cell (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] z
);

  assign z[1] = (a[1] & b[0]) | (a[0] & b[1]);
  assign z[0] = (a[1] & b[1]) | (a[0] & b[0]);

endmodule
