// coef_dec: coefficient decoder, the replacement for a filter's coefficient ROM.
//
// The coefficient address is decoded to NCOEF lines.  For each channel i and each
// residue v, output line (i, v) is the OR of the address lines k whose coefficient
// satisfies COEF[k] mod m_i = v.  The decoder therefore yields every coefficient
// directly in one-hot residue form, with no stored table and one OR level after
// the address decoder.  The coefficient values are a parameter (default: a 32-tap
// triangular window, see rns_pkg::default_coefs); they are this design's choice.
// Purely combinational.  Unused lines of narrower channels are zero.
module coef_dec
  import rns_pkg::*;
#(
  parameter coef_tab_t COEF = default_coefs()
) (
  input  logic [AW-1:0] addr,
  output ohr_vec_t      y
);

  logic [NCOEF-1:0] sel;

  always_comb begin
    sel = '0;
    sel[addr] = 1'b1;
  end

  always_comb begin
    y = '0;
    for (int i = 0; i < R; i++)
      for (int k = 0; k < NCOEF; k++)
        y[i][COEF[k] % MODULI[i]] = y[i][COEF[k] % MODULI[i]] | sel[k];
  end

endmodule
