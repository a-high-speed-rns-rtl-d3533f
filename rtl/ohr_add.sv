// ohr_add: one-hot residue (OHR) cell, a modulo-N adder built as a barrel shifter.
//
// Operands and result are one-hot words of N lines (line v high <=> value v).
// The cell rotates x by the amount selected by y: z[k] = OR_j ( x[j] AND y[(k-j) mod N] ).
// There are no carries, so the delay is one AND-OR level whatever the operands.
// A non-code input (no line or several lines high) gives a non-code output, which
// lets errors travel to the checker at the end of the datapath.
// Purely combinational.  Building the adder as a switch array (barrel shifter)
// follows the source architecture; the AND-OR form of the switches is this design's.
module ohr_add #(
  parameter int N = 7            // modulus
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] z
);

  always_comb begin
    z = '0;
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++)
        z[k] = z[k] | (x[j] & y[(k - j + N) % N]);
  end

endmodule
