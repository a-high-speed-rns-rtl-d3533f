// mofn_chk: K-out-of-2K code checker with a 1-out-of-2 (two-rail) output.
//
// The 2K inputs are split into halves A = w[K-1:0] and B = w[2K-1:K].  T_i(A) is the
// threshold (majority-type) function "at least i of the bits of A are 1".
//   f = OR over odd  i of T_i(A) AND T_(K-i)(B)
//   g = OR over even i of T_i(A) AND T_(K-i)(B)      (T_0 = 1)
// For a word of weight exactly K, with a ones in A, only i = a satisfies both
// thresholds, so exactly one of f, g is 1 (f for odd a).  Weight above K makes both
// 1, weight below K makes both 0: every non-code word gives (f,g) = 00 or 11.
// Purely combinational.  Using threshold circuits follows the source architecture;
// this particular construction is this design's own.
module mofn_chk #(
  parameter int K = 3
) (
  input  logic [2*K-1:0] w,
  output logic [1:0]     fg      // fg[1] = f, fg[0] = g
);

  logic [K:0] ta, tb;            // ta[i] = T_i(A), tb[i] = T_i(B)

  always_comb begin
    int ca, cb;
    ca = 0;
    cb = 0;
    for (int b = 0; b < K; b++) begin
      ca += int'(w[b]);
      cb += int'(w[K + b]);
    end
    for (int i = 0; i <= K; i++) begin
      ta[i] = (ca >= i);
      tb[i] = (cb >= i);
    end
  end

  always_comb begin
    fg = '0;
    for (int i = 0; i <= K; i++)
      if (i % 2 == 1) fg[1] = fg[1] | (ta[i] & tb[K - i]);
      else            fg[0] = fg[0] | (ta[i] & tb[K - i]);
  end

endmodule
