// mrc_cell: one cell of the mixed-radix converter, z = |(x - y) * K|_M, in one-hot form.
//
// x is a one-hot residue modulo M.  y is a one-hot mixed-radix digit modulo MY (the
// modulus of an earlier channel); it is first reduced modulo M by ORing line v onto
// line v mod M, then negated by renaming line v as line (M - v) mod M.  One one-hot
// adder cell forms x - y, and the constant multiplication by K (a unit modulo M) is
// a fixed permutation of the lines.  So the cell is wiring plus one barrel shifter,
// in place of the look-up table of a conventional mixed-radix converter.
// Purely combinational.
module mrc_cell #(
  parameter int M  = 7,          // modulus of this channel
  parameter int MY = 5,          // modulus of the digit y
  parameter int K  = 3           // constant multiplier, the inverse of MY modulo M
) (
  input  logic [M-1:0]  x,
  input  logic [MY-1:0] y,
  output logic [M-1:0]  z
);

  logic [M-1:0] y_red, y_neg, diff;

  always_comb begin
    y_red = '0;
    for (int v = 0; v < MY; v++)
      y_red[v % M] = y_red[v % M] | y[v];
  end

  always_comb begin
    for (int v = 0; v < M; v++)
      y_neg[(M - v) % M] = y_red[v];
  end

  ohr_add #(.N(M)) u_sub (.x(x), .y(y_neg), .z(diff));

  always_comb begin
    for (int v = 0; v < M; v++)
      z[(v * K) % M] = diff[v];
  end

endmodule
