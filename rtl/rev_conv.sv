// rev_conv: reverse converter, one-hot residues to binary.
//
// The residues pass through the one-hot mixed-radix converter (mrc_conv); the
// one-hot digits it produces are encoded to binary digits by OR-gate encoders
// (ohr_enc) and weighted into the binary result (mr2bin).  The one-hot digits are
// brought out as well, for the TSC checker.
// Purely combinational.
module rev_conv
  import rns_pkg::*;
(
  input  ohr_vec_t      res,     // one-hot residues
  output ohr_vec_t      dig_oh,  // one-hot mixed-radix digits
  output digit_vec_t    dig,     // binary mixed-radix digits
  output logic [OW-1:0] x_bin    // binary result
);

  mrc_conv u_mrc (.res(res), .dig(dig_oh));

  for (genvar i = 0; i < R; i++) begin : g_enc
    localparam int M = MODULI[i];
    ohr_enc #(.N(M), .BW(DW)) u_enc (.x(dig_oh[i][M-1:0]), .b(dig[i]));
  end

  mr2bin u_w (.dig(dig), .x_bin(x_bin));

endmodule
