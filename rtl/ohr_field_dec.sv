// ohr_field_dec: decoder that feeds one bit field of a binary number into the
// one-hot residue domain.
//
// An L-bit field f that sits SHIFT bits up in the binary word stands for the value
// f * 2^SHIFT.  The field is decoded to 2^L lines, and line v is hardwired (ORed)
// onto residue line (v * 2^SHIFT) mod M.  The result is the one-hot residue of the
// field's weighted value, after one decoder and one OR level.  No table is stored:
// the mapping is wiring computed at elaboration.
// Purely combinational.  Field decoding follows the source architecture; the split
// of the decoder and the OR wiring into this module is this design's.
module ohr_field_dec #(
  parameter int M     = 7,       // modulus
  parameter int L     = 3,       // field width
  parameter int SHIFT = 0        // bit position of the field's LSB in the binary word
) (
  input  logic [L-1:0] f,
  output logic [M-1:0] z
);
  import rns_pkg::*;

  localparam int PW = pow_mod(2, SHIFT, M);

  logic [(1<<L)-1:0] dec;

  always_comb begin
    dec = '0;
    dec[f] = 1'b1;
  end

  always_comb begin
    z = '0;
    for (int v = 0; v < (1 << L); v++)
      z[(v * PW) % M] = z[(v * PW) % M] | dec[v];
  end

endmodule
