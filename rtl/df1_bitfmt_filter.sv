// df1_bitfmt_filter - IIR filter in Direct Form I built on one bit-formatted
// sum of products.
//
// The filter computes
//     y(k) = sum_{i=0..NB-1} b_i u(k-i) + sum_{i=1..NA} (-a_i) y(k-i)
// as a single sum of NB + NA products (bitfmt_sop), so the only rounding
// per sample is the faithful rounding of that sum onto the output format
// (M_Y, L_Y). Two tapped delay lines keep u(k-1..k-NB+1) and y(k-1..k-NA).
// The defaults are the 4th-order Butterworth low-pass butter(4, 0.136) with
// 16-bit data: u on (4,-11), y on (5,-10), 4 guard bits, a 20-bit
// modular accumulator, and per-product right shifts 21,19,18,19,21 (b_0..b_4)
// and 9,9,10,12 (a_1..a_4).
//
// Interface: in_valid with u_in presents one input sample u(k); the filter
// accepts one sample in every cycle where in_valid is high (no back-pressure).
// y_out is y(k), valid in the cycle after the sample was accepted, flagged
// by out_valid; it holds until the next sample. Synchronous active-low
// reset clears the delay lines (rest state) and out_valid.
// Timing: one sample per clock; the sum of products is one combinational
// path from the delay-line registers to the output register, since y(k)
// feeds back into y(k+1).
// The arithmetic follows the bit-formatting method and the worked example;
// the valid/reset interface, single-cycle schedule and parameter packaging
// are this design's choices. An assertion checks that out_valid is raised only
// in the cycle after an accepted sample.
module df1_bitfmt_filter
  import bitfmt_pkg::*;
#(
  parameter int          W           = BW_W,
  parameter int          NB          = BW_NB,
  parameter int          NA          = BW_NA,
  parameter int          B_INT  [NB] = BW_B_INT,
  parameter int          B_LSB  [NB] = BW_B_LSB,
  parameter int          NA_INT [NA] = BW_NA_INT,   // -a_1 .. -a_NA
  parameter int          NA_LSB [NA] = BW_NA_LSB,
  parameter int          L_U         = BW_L_U,
  parameter int          M_Y         = BW_M_F,
  parameter int          L_Y         = BW_L_F,
  parameter round_mode_e MODE        = RND_TRUNC,
  parameter int          DELTA_FORCE = -1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] u_in,
  output logic                out_valid,
  output logic signed [W-1:0] y_out
);

  localparam int N = NB + NA;

  typedef int int_arr_t [N];

  function automatic int_arr_t cat_int();
    int_arr_t r;
    for (int i = 0; i < NB; i++) r[i]      = B_INT[i];
    for (int i = 0; i < NA; i++) r[NB + i] = NA_INT[i];
    return r;
  endfunction

  function automatic int_arr_t cat_lsb_c();
    int_arr_t r;
    for (int i = 0; i < NB; i++) r[i]      = B_LSB[i];
    for (int i = 0; i < NA; i++) r[NB + i] = NA_LSB[i];
    return r;
  endfunction

  function automatic int_arr_t cat_lsb_v();
    int_arr_t r;
    for (int i = 0; i < NB; i++) r[i]      = L_U;
    for (int i = 0; i < NA; i++) r[NB + i] = L_Y;
    return r;
  endfunction

  localparam int_arr_t C_ALL  = cat_int();
  localparam int_arr_t LC_ALL = cat_lsb_c();
  localparam int_arr_t LV_ALL = cat_lsb_v();

  logic [W-1:0]        u_tap [NB-1];
  logic [W-1:0]        y_tap [NA];
  logic signed [W-1:0] v     [N];
  logic signed [W-1:0] y_now;

  tap_delay_line #(
    .W    (W),
    .DEPTH(NB - 1)
  ) u_udl (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .d    (u_in),
    .tap  (u_tap)
  );

  tap_delay_line #(
    .W    (W),
    .DEPTH(NA)
  ) u_ydl (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .d    (y_now),
    .tap  (y_tap)
  );

  always_comb begin
    v[0] = u_in;
    for (int i = 1; i < NB; i++) v[i]      = u_tap[i-1];
    for (int i = 0; i < NA; i++) v[NB + i] = y_tap[i];
  end

  bitfmt_sop #(
    .N          (N),
    .W_C        (W),
    .W_V        (W),
    .C_INT      (C_ALL),
    .L_C        (LC_ALL),
    .L_V        (LV_ALL),
    .M_F        (M_Y),
    .L_F        (L_Y),
    .MODE       (MODE),
    .DELTA_FORCE(DELTA_FORCE)
  ) u_sop (
    .v(v),
    .s(y_now)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // y(k) is the newest entry of the output delay line.
  assign y_out = y_tap[0];

  // A result is flagged only in the cycle after a sample was accepted.
  a_out_after_in : assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid)
  );

endmodule
