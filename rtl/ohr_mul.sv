// ohr_mul: one-hot modulo-M multiplier using index calculus (M prime).
//
// Every nonzero residue is a power g^e of a primitive root g.  Renaming residue
// line g^e as index line e is pure wiring, so the product x*y becomes the sum of
// the indices modulo M-1, done by one one-hot adder cell (ohr_add, a barrel
// shifter), and the sum is wired back to residue line g^(ex+ey).  Zero has no
// index: the product line 0 is x[0] OR y[0].
// The delay is one adder cell plus one OR gate, the same as for addition.
// Purely combinational.  The index-calculus method follows the source architecture;
// the choice of the smallest primitive root and the zero handling are this design's.
module ohr_mul #(
  parameter int M = 7            // prime modulus
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  output logic [M-1:0] z
);
  import rns_pkg::*;

  localparam int G = prim_root(M);
  localparam int N = M - 1;      // order of the multiplicative group

  logic [N-1:0] xi, yi, si;

  // residue line g^e -> index line e
  for (genvar e = 0; e < N; e++) begin : g_log
    assign xi[e] = x[pow_mod(G, e, M)];
    assign yi[e] = y[pow_mod(G, e, M)];
  end

  ohr_add #(.N(N)) u_idx_add (.x(xi), .y(yi), .z(si));

  // index line e -> residue line g^e, and the zero line
  always_comb begin
    z    = '0;
    z[0] = x[0] | y[0];
    for (int e = 0; e < N; e++)
      z[pow_mod(G, e, M)] = si[e];
  end

endmodule
