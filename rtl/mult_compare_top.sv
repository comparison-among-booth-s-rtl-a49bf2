// mult_compare_top: the three combinational multipliers of the comparison,
// side by side, each with its own operands and result.
//
//   booth_*  booth_mult: N x N two's complement Booth multiplier; the product
//            comes out as two halves, {booth_p_hi, booth_p_lo}, and
//            booth_ops shows which action (shift, add, subtract) each of the
//            N steps took.
//   pu_*     pek_mult_unsigned: N x N multiplexer-based array multiplier for
//            positive (unsigned) numbers; one 2N-bit product.
//   ps_*     pek_mult_signed: the two's complement variant of the same array;
//            one 2N-bit two's complement product.
//
// The three are independent alternatives for the same job and share nothing;
// they sit in one top so that they can be built, simulated and measured
// together. Timing: all purely combinational, no clock and no reset.
module mult_compare_top
  import mult_pkg::*;
#(
  parameter int unsigned N = mult_pkg::WIDTH
) (
  // Booth multiplier
  input  logic [N-1:0]      booth_m,
  input  logic [N-1:0]      booth_q,
  output logic [N-1:0]      booth_p_hi,
  output logic [N-1:0]      booth_p_lo,
  output booth_op_e [N-1:0] booth_ops,
  // Pekmestzi multiplier, unsigned operands
  input  logic [N-1:0]      pu_x,
  input  logic [N-1:0]      pu_y,
  output logic [2*N-1:0]    pu_p,
  // Pekmestzi multiplier, two's complement operands
  input  logic [N-1:0]      ps_x,
  input  logic [N-1:0]      ps_y,
  output logic [2*N-1:0]    ps_p
);

  booth_mult #(.N(N)) u_booth (
    .m   (booth_m),
    .q   (booth_q),
    .p_hi(booth_p_hi),
    .p_lo(booth_p_lo),
    .ops (booth_ops)
  );

  pek_mult_unsigned #(.N(N)) u_pek_unsigned (
    .x(pu_x),
    .y(pu_y),
    .p(pu_p)
  );

  pek_mult_signed #(.N(N)) u_pek_signed (
    .x(ps_x),
    .y(ps_y),
    .p(ps_p)
  );

endmodule
