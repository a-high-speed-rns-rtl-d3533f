// rns_proc: processor of one modulus channel, a one-hot multiply-accumulate unit.
//
// The channel holds its accumulator as a one-hot residue of M lines.  Each clock it
// performs the operation op on the one-hot operands x and y:
//   OP_NOP hold, OP_CLR acc := 0, OP_ADD acc := x + y, OP_MUL acc := x * y,
//   OP_MAC acc := acc + x * y   (all modulo M).
// Addition is one barrel-shifter cell (ohr_add), multiplication the index-calculus
// multiplier (ohr_mul), and MAC the multiplier followed by one more cell, so every
// operation completes in one clock whatever the operand values: an N-term MAC takes
// N cycles (OP_MUL for the first term, OP_MAC for the others).
// Timing: z is the registered accumulator; it shows the result one clock after op.
// Reset (synchronous, active low) loads the code word for 0, so the register
// always holds a valid one-hot word.  The operation set and reset are this design's
// own choices; single-cycle add/multiply/MAC follows the source architecture.
module rns_proc
  import rns_pkg::*;
#(
  parameter int M = 7            // prime modulus of this channel
) (
  input  logic         clk,
  input  logic         rst_n,
  input  op_e          op,
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  output logic [M-1:0] z
);

  localparam logic [M-1:0] ZERO = M'(1);

  logic [M-1:0] sum_xy, prod_xy, mac_xy;

  ohr_add #(.N(M)) u_add (.x(x),   .y(y),       .z(sum_xy));
  ohr_mul #(.M(M)) u_mul (.x(x),   .y(y),       .z(prod_xy));
  ohr_add #(.N(M)) u_acc (.x(z),   .y(prod_xy), .z(mac_xy));

  always_ff @(posedge clk) begin
    if (!rst_n) z <= ZERO;
    else begin
      unique case (op)
        OP_CLR:  z <= ZERO;
        OP_ADD:  z <= sum_xy;
        OP_MUL:  z <= prod_xy;
        OP_MAC:  z <= mac_xy;
        default: z <= z;
      endcase
    end
  end

  // Operands of an arithmetic operation must be code words.
  a_operands_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (op inside {OP_ADD, OP_MUL, OP_MAC}) |-> ($onehot(x) && $onehot(y)))
    else $error("rns_proc: operand is not a one-hot residue");

endmodule
