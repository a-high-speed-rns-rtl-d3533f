// mrc_conv: residue-to-mixed-radix converter, built from one-hot cells.
//
// From the residues x_1..x_r it forms the mixed-radix digits A_1..A_r with
//   X = A_1 + A_2 m_1 + A_3 m_1 m_2 + ... + A_r m_1 ... m_(r-1).
// A_1 = x_1.  Stage s (s = 1..r-1) removes digit A_s from every later channel j:
//   x_j <- |(x_j - A_s) * m_s^-1|_(m_j),
// one mrc_cell per (s, j) pair, r(r-1)/2 cells in a triangle, and A_(s+1) is the
// value channel s+1 holds after stage s.  Inputs and outputs are one-hot, so every
// digit stays a 1-out-of-n word that the checker can test at the end.
// Purely combinational, r-1 cells deep.  Unused lines are zero.
module mrc_conv
  import rns_pkg::*;
(
  input  ohr_vec_t res,          // one-hot residues x_1 .. x_r
  output ohr_vec_t dig           // one-hot mixed-radix digits A_1 .. A_r
);

  // Stage s holds channel values after s digits have been removed; stage 0 is the input.
  for (genvar s = 0; s < R; s++) begin : g_stage
    ohr_t v [R];
    for (genvar j = 0; j < R; j++) begin : g_ch
      if (s == 0) begin : g_in
        assign v[j] = res[j];
      end else if (j >= s) begin : g_cell
        localparam int MJ = MODULI[j];
        localparam int MS = MODULI[s-1];
        logic [MJ-1:0] zc;
        mrc_cell #(.M(MJ), .MY(MS), .K(inv_mod(MS, MJ))) u_cell (
          .x (g_stage[s-1].v[j][MJ-1:0]),
          .y (g_stage[s-1].v[s-1][MS-1:0]),
          .z (zc)
        );
        assign v[j] = MMAX'(zc);
      end else begin : g_done
        assign v[j] = g_stage[s-1].v[j];
      end
    end
    assign dig[s] = v[s];
  end

endmodule
