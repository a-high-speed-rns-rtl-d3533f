// tsc_checker: totally self-checking checker of the r one-hot mixed-radix digits.
//
// Each channel's 1-out-of-m_i digit is translated by OR gates into a K-out-of-2K
// word (ohr2mofn) and checked by threshold circuits into a 1-out-of-2 pair
// (mofn_chk).  The r pairs are merged by a chain of r-1 two-rail cells (trc_cell)
// into one final pair chk.  chk is 01 or 10 when every digit is one-hot, and 00 or
// 11 when any digit has no line or several lines high; err = NOT(chk[1] XOR chk[0]).
// Purely combinational.
module tsc_checker
  import rns_pkg::*;
(
  input  ohr_vec_t   dig,        // one-hot digits to check
  output logic [1:0] chk,        // final 1-out-of-2 code
  output logic       err         // 1: chk is not a code word
);

  logic [1:0] pair [R];
  logic [1:0] acc  [R];

  for (genvar i = 0; i < R; i++) begin : g_ch
    localparam int M = MODULI[i];
    localparam int K = mofn_k(M);
    logic [2*K-1:0] w;
    ohr2mofn #(.N(M), .K(K)) u_tr  (.x(dig[i][M-1:0]), .w(w));
    mofn_chk #(.K(K))        u_chk (.w(w), .fg(pair[i]));
  end

  assign acc[0] = pair[0];
  for (genvar i = 1; i < R; i++) begin : g_tree
    trc_cell u_trc (.a(acc[i-1]), .b(pair[i]), .z(acc[i]));
  end

  assign chk = acc[R-1];
  assign err = ~(chk[1] ^ chk[0]);

endmodule
