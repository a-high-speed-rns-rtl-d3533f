// mr2bin: mixed-radix digits to binary.
//
// Forms X = A_1 + A_2 m_1 + A_3 m_1 m_2 + ... + A_r m_1...m_(r-1) from the binary
// digits, using constant weights (rns_pkg::mr_weight), i.e. constant multipliers
// and an adder tree.  The result is below M = m_1...m_r, so OW bits hold it.
// The source architecture ends at the mixed-radix digits; this weighting stage, which
// yields the binary output of the processor, is this design's own.
// Purely combinational.
module mr2bin
  import rns_pkg::*;
(
  input  digit_vec_t    dig,
  output logic [OW-1:0] x_bin
);

  always_comb begin
    x_bin = '0;
    for (int i = 0; i < R; i++)
      x_bin = x_bin + OW'(mr_weight(i)) * OW'(dig[i]);
  end

endmodule
