// fxp_round_shift - moves a two's-complement word to another LSB position.
//
// For SHIFT > 0 the SHIFT least significant bits are removed: with
// MODE = RND_TRUNC the result is floor(x / 2^SHIFT) (round down, the plain
// arithmetic shift), with MODE = RND_NEAREST it is floor(x / 2^SHIFT + 1/2)
// (round to nearest, ties up). For SHIFT < 0, -SHIFT zero bits are appended
// on the right, which is exact. SHIFT = 0 leaves the value alone.
// The result is then kept on W_OUT bits modulo 2^W_OUT: upper bits above the
// output's sign position are dropped (sign-extended when W_OUT is wider).
// Dropping them is safe whenever the final sum the word feeds is known to fit
// on W_OUT bits (two's-complement wrap-around cancels out).
//
// Defaults: the final shift of the example filter, 20 -> 16 bits dropping 4
// guard bits, here with round-to-nearest (the filter itself truncates).
//
// Interface: x (W_IN bits, signed) in, y (W_OUT bits, signed) out.
// Timing: purely combinational.
// The rounding operators follow the method this datapath implements; the
// round-half-up tie rule is this design's choice.
module fxp_round_shift
  import bitfmt_pkg::*;
#(
  parameter int          W_IN  = 20,
  parameter int          W_OUT = 16,
  parameter int          SHIFT = 4,
  parameter round_mode_e MODE  = RND_NEAREST
) (
  input  logic signed [W_IN-1:0]  x,
  output logic signed [W_OUT-1:0] y
);

  localparam int RSH = (SHIFT > 0) ? SHIFT : 0;   // bits removed
  localparam int LSH = (SHIFT < 0) ? -SHIFT : 0;  // zeros appended
  // Working width: room for the rounding carry and for the output window.
  localparam int WX0 = (W_IN + 1 > W_OUT + RSH) ? W_IN + 1 : W_OUT + RSH;
  localparam int WX  = WX0 + LSH;

  logic signed [WX-1:0] xe;
  logic signed [WX-1:0] xr;
  logic signed [WX-1:0] xs;

  always_comb begin
    xe = WX'(x);                                   // sign extension
    if (MODE == RND_NEAREST && RSH > 0)
      xr = xe + (WX'(1) <<< (RSH - 1));            // add half an output LSB
    else
      xr = xe;
    if (RSH > 0)      xs = xr >>> RSH;
    else if (LSH > 0) xs = xr <<< LSH;
    else              xs = xr;
  end

  assign y = xs[W_OUT-1:0];

endmodule
