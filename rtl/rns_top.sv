// rns_top: one-hot residue number system processor with self-checking output.
//
// Datapath (all residues one-hot, one line per residue value):
//   x_bin, y_bin --fwd_conv--> x_i, y_i      (or y_i from the coefficient decoder)
//   x_i, y_i --rns_proc (one per modulus)--> accumulator z_i
//   z_i --rev_conv--> one-hot mixed-radix digits --> binary digits, binary result
//   one-hot digits --tsc_checker--> chk (1-out-of-2), err
// Every channel works on its own modulus in parallel and completes an add, a
// multiply or a MAC in one clock, so a 32-coefficient MAC takes 32 clocks.
// Interface: op selects the operation (rns_pkg::op_e) for all channels in the cycle
// it is applied; coef_sel = 1 takes operand Y from the coefficient decoder at
// coef_addr instead of y_bin.  z_bin, mr_dig, chk and err are combinational from
// the accumulators, so they show an operation's result one clock after it.
// Operands are unsigned W-bit numbers; results are modulo M = 37,182,145.
// mr_dig holds each digit in DW = 5 bits; digit i is below m_i, so the top bits of
// the digits of moduli 5, 7, 11 and 13 are always 0.
// The moduli set, widths, operation codes, reset and binary weighting stage are
// this design's choices; the block structure follows the source architecture.
module rns_top
  import rns_pkg::*;
#(
  parameter int W = 8            // binary operand width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  op_e           op,
  input  logic [W-1:0]  x_bin,
  input  logic [W-1:0]  y_bin,
  input  logic          coef_sel,
  input  logic [AW-1:0] coef_addr,
  output logic [OW-1:0] z_bin,
  output digit_vec_t    mr_dig,
  output logic [1:0]    chk,
  output logic          err
);

  ohr_vec_t x_oh, y_conv, y_coef, y_oh, z_oh, dig_oh;

  fwd_conv #(.W(W)) u_fwd (.x_bin(x_bin), .y_bin(y_bin), .x_oh(x_oh), .y_oh(y_conv));

  coef_dec u_coef (.addr(coef_addr), .y(y_coef));

  assign y_oh = coef_sel ? y_coef : y_conv;

  for (genvar i = 0; i < R; i++) begin : g_ch
    localparam int M = MODULI[i];
    logic [M-1:0] zi;
    rns_proc #(.M(M)) u_proc (
      .clk (clk), .rst_n (rst_n), .op (op),
      .x   (x_oh[i][M-1:0]),
      .y   (y_oh[i][M-1:0]),
      .z   (zi)
    );
    assign z_oh[i] = MMAX'(zi);
  end

  rev_conv u_rev (.res(z_oh), .dig_oh(dig_oh), .dig(mr_dig), .x_bin(z_bin));

  tsc_checker u_tsc (.dig(dig_oh), .chk(chk), .err(err));

endmodule
