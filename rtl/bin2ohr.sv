// bin2ohr: binary-to-one-hot-residue converter for one modulus M.
//
// The W-bit binary input is cut into F = ceil(W/L) fields of L = ceil(log2 M) bits
// (the top field may be narrower).  Each field goes through a decoder whose lines
// are hardwired to the one-hot residue of the field's weighted value
// (ohr_field_dec).  A binary tree of one-hot adder cells (ohr_add) then sums the F
// partial residues, so the conversion takes one decoder plus ceil(log2 F) cell
// delays and needs no ROM.
// Interface: b (binary, unsigned) in, z (one-hot residue of b mod M) out.
// Purely combinational.  The field split and the tree of cells follow the source
// architecture; the tree is laid out as a heap (node n has children 2n+1, 2n+2).
module bin2ohr #(
  parameter int M = 23,          // modulus
  parameter int W = 8            // binary input width
) (
  input  logic [W-1:0] b,
  output logic [M-1:0] z
);

  localparam int L = $clog2(M);
  localparam int F = (W + L - 1) / L;

  // Heap-ordered tree: nodes 0..F-2 are adders, nodes F-1..2F-2 are field decoders.
  logic [M-1:0] node [2*F-1];

  for (genvar k = 0; k < F; k++) begin : g_field
    localparam int LO = k * L;
    localparam int LK = (W - LO < L) ? (W - LO) : L;
    ohr_field_dec #(.M(M), .L(LK), .SHIFT(LO)) u_dec (
      .f (b[LO +: LK]),
      .z (node[F - 1 + k])
    );
  end

  for (genvar n = 0; n < F - 1; n++) begin : g_tree
    ohr_add #(.N(M)) u_add (
      .x (node[2*n + 1]),
      .y (node[2*n + 2]),
      .z (node[n])
    );
  end

  assign z = node[0];

endmodule
