// fwd_conv: binary-to-residue converter of the processor (one per operand pair).
//
// Converts the two unsigned W-bit operands X and Y into one-hot residues for every
// modulus channel, one bin2ohr converter per operand and channel, all in parallel.
// Output channel i is MODULI[i] lines wide, zero-extended to MMAX lines.
// Purely combinational; its delay is that of the slowest bin2ohr.
module fwd_conv
  import rns_pkg::*;
#(
  parameter int W = 8            // binary operand width
) (
  input  logic [W-1:0] x_bin,
  input  logic [W-1:0] y_bin,
  output ohr_vec_t     x_oh,
  output ohr_vec_t     y_oh
);

  for (genvar i = 0; i < R; i++) begin : g_ch
    localparam int M = MODULI[i];
    logic [M-1:0] xr, yr;
    bin2ohr #(.M(M), .W(W)) u_x (.b(x_bin), .z(xr));
    bin2ohr #(.M(M), .W(W)) u_y (.b(y_bin), .z(yr));
    assign x_oh[i] = MMAX'(xr);
    assign y_oh[i] = MMAX'(yr);
  end

endmodule
