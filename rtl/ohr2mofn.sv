// ohr2mofn: translator from a 1-out-of-N code to a K-out-of-2K code (OR gates).
//
// K is the smallest value with C(2K, K) >= N.  Input line v is given the v-th
// K-out-of-2K word (in increasing numeric order, see rns_pkg::mofn_mask), and output bit b is the OR of the
// input lines whose word has bit b set.  A one-hot input gives a word of weight K;
// no line high gives weight 0; two or more lines high give the union of distinct
// weight-K words, of weight above K.  Non-code inputs thus map to non-code outputs.
// Purely combinational.  The OR-gate translator follows the source architecture;
// the assignment of words to lines is this design's own.
module ohr2mofn
  import rns_pkg::*;
#(
  parameter int N = 23,                  // lines of the 1-out-of-N code
  parameter int K = mofn_k(N)            // weight of the output code
) (
  input  logic [N-1:0]   x,
  output logic [2*K-1:0] w
);

  for (genvar b = 0; b < 2 * K; b++) begin : g_bit
    localparam logic [63:0] MSK = mofn_mask(N, K, b);
    assign w[b] = |(x & MSK[N-1:0]);
  end

endmodule
