// ohr_enc: one-hot to binary encoder, a set of OR gates.
//
// Output bit k is the OR of the input lines whose index has bit k set.  For a
// one-hot input this is the binary value of the residue; the encoder itself does
// no checking (the TSC checker watches the one-hot lines).
// Purely combinational.
module ohr_enc #(
  parameter int N  = 23,         // number of one-hot lines
  parameter int BW = 5           // output width, at least clog2(N)
) (
  input  logic [N-1:0]  x,
  output logic [BW-1:0] b
);

  always_comb begin
    b = '0;
    for (int k = 0; k < BW; k++)
      for (int v = 0; v < N; v++)
        if (((v >> k) & 1) == 1) b[k] = b[k] | x[v];
  end

endmodule
