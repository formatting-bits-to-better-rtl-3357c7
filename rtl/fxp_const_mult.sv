// fxp_const_mult - constant multiplier M_i of the bit-formatted sum.
//
// Computes p = C * v, where the constant C is fixed at elaboration, and
// formats the product for the accumulator: the product's LSB position
// l_c + l_v is moved to the common accumulator LSB l_f - delta by a shift of
// SHIFT = l_f - delta - l_c - l_v bits (right shift with the chosen rounding
// when positive, zero padding when negative), and only the W_OUT bits up to
// the final MSB m_f are kept (MSB formatting: the upper bits of the product
// are sign repetitions in the final sum and are discarded).
//
// Interface: v (W_V bits, signed integer of the variable) in, p (W_OUT bits,
// the formatted product on format (m_f, l_f - delta)) out.
// Timing: combinational.
// The computation (product, one right shift per multiplier, bits above m_f
// dropped) follows the method; writing it as a full product followed by a
// shifter, leaving width trimming to synthesis, is this design's choice.
module fxp_const_mult
  import bitfmt_pkg::*;
#(
  parameter int                 W_C   = 16,
  parameter int                 W_V   = 16,
  parameter logic signed [W_C-1:0] C  = W_C'(22280),
  parameter int                 SHIFT = 21,
  parameter int                 W_OUT = 20,
  parameter round_mode_e        MODE  = RND_TRUNC
) (
  input  logic signed [W_V-1:0]   v,
  output logic signed [W_OUT-1:0] p
);

  localparam int WP = W_C + W_V;

  logic signed [WP-1:0] prod;

  always_comb prod = WP'(C) * WP'(v);

  fxp_round_shift #(
    .W_IN (WP),
    .W_OUT(W_OUT),
    .SHIFT(SHIFT),
    .MODE (MODE)
  ) u_fmt (
    .x(prod),
    .y(p)
  );

endmodule
