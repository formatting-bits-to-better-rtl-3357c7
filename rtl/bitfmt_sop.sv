// bitfmt_sop - bit-formatted fixed-point sum of products.
//
// Computes s = sum_i C_i * v_i for N constants fixed at elaboration and
// returns it on the final format (M_F, L_F) as a faithful rounding of the
// correctly rounded sum: with truncation the result is floor(s) or one LSB
// below it (error in (-2^(L_F+1), 0]), with round-to-nearest it is floor(s) or
// ceil(s) (error in (-2^L_F, 2^L_F)).
//
// How: only the bits that can change the final result are kept.
//   * LSB formatting. With n_f terms having bits below L_F, keeping
//     delta = ceil(log2(n_f)) guard bits below L_F is enough for the
//     faithful rounding. delta is found by an iteration that drops terms lying
//     wholly below L_F - delta and recomputes delta until it is stable. Every
//     product is then moved to the common LSB L_F - delta: multiplier i shifts
//     right by d_i = L_F - delta - (L_C_i + L_V_i) (or pads zeros if d_i < 0).
//   * MSB formatting. Since the final sum is known to fit on (M_F, L_F), bits
//     above M_F are sign repetitions: every product and every partial sum is
//     kept on W_ACC = M_F - L_F + delta + 1 bits and added modulo 2^W_ACC.
//   * The sum is shifted right once more by d_f = delta to the final format.
// Terms whose MSB lies below L_F - delta contribute nothing and get no
// multiplier. DELTA_FORCE >= 0 overrides the computed delta (for comparing
// with no guard bits or with all bits kept); -1 uses the computed one.
//
// Interface: v[N] (W_V-bit integers; term i has LSB position L_V[i]) in,
// s (M_F - L_F + 1 bits) out. Constants: C_INT[i] on W_C bits with LSB
// position L_C[i]; their MSB is L_C[i] + W_C - 1.
// Timing: combinational (multipliers, ceil(log2 N) adder levels, rounding).
// The method (delta, shifts, modular sum, final shift) follows the
// bit-formatting technique. Where the source text counts all n terms when the
// iteration starts, this design counts only the terms with bits below L_F,
// as the guard-bit rule itself states; the two agree for the default filter.
module bitfmt_sop
  import bitfmt_pkg::*;
#(
  parameter int          N           = 9,
  parameter int          W_C         = 16,
  parameter int          W_V         = 16,
  parameter int          C_INT [N]   = '{22280, 22280, 16710, 22280, 22280,
                                         23520, -26282, 26781, -20887},
  parameter int          L_C   [N]   = '{-24, -22, -21, -22, -24,
                                         -13, -13, -14, -16},
  parameter int          L_V   [N]   = '{-11, -11, -11, -11, -11,
                                         -10, -10, -10, -10},
  parameter int          M_F         = 5,
  parameter int          L_F         = -10,
  parameter round_mode_e MODE        = RND_TRUNC,
  parameter int          DELTA_FORCE = -1
) (
  input  logic signed [W_V-1:0] v [N],
  output logic signed [M_F-L_F:0] s
);

  // Format of product i: (m_c + m_v + 1, l_c + l_v).
  function automatic int prod_msb(input int i);
    return (L_C[i] + W_C - 1) + (L_V[i] + W_V - 1) + 1;
  endfunction

  function automatic int prod_lsb(input int i);
    return L_C[i] + L_V[i];
  endfunction

  // Number of guard bits: ceil(log2(n)) over the terms with bits below L_F,
  // recomputed after removing the terms that fall wholly below L_F - delta.
  function automatic int eval_delta();
    int n_cur, n_prev, d;
    n_cur = 0;
    for (int i = 0; i < N; i++)
      if (prod_lsb(i) < L_F) n_cur++;
    d = ceil_log2(n_cur);
    for (int it = 0; it <= N; it++) begin
      n_prev = n_cur;
      d      = ceil_log2(n_prev);
      n_cur  = 0;
      for (int i = 0; i < N; i++)
        if (prod_lsb(i) < L_F && prod_msb(i) >= L_F - d) n_cur++;
      if (n_cur == n_prev) break;
    end
    return d;
  endfunction

  localparam int DELTA_CALC = eval_delta();
  localparam int DELTA      = (DELTA_FORCE >= 0) ? DELTA_FORCE : DELTA_CALC;
  localparam int L_ACC      = L_F - DELTA;              // accumulator LSB
  localparam int W_ACC      = M_F - L_ACC + 1;          // accumulator width

  logic [W_ACC-1:0] term [N];
  logic [W_ACC-1:0] acc;

  for (genvar i = 0; i < N; i++) begin : g_term
    localparam int  D_I  = L_ACC - (L_C[i] + L_V[i]);   // right shift d_i
    localparam bit  KEEP = (prod_msb(i) >= L_ACC);
    if (KEEP) begin : g_mult
      logic signed [W_ACC-1:0] p;
      fxp_const_mult #(
        .W_C  (W_C),
        .W_V  (W_V),
        .C    (W_C'(C_INT[i])),
        .SHIFT(D_I),
        .W_OUT(W_ACC),
        .MODE (MODE)
      ) u_mult (
        .v(v[i]),
        .p(p)
      );
      assign term[i] = p;
    end else begin : g_drop
      assign term[i] = '0;
    end
  end

  mod_sum_tree #(
    .W(W_ACC),
    .N(N)
  ) u_sum (
    .x(term),
    .s(acc)
  );

  // Final right shift d_f = delta onto (M_F, L_F).
  fxp_round_shift #(
    .W_IN (W_ACC),
    .W_OUT(M_F - L_F + 1),
    .SHIFT(DELTA),
    .MODE (MODE)
  ) u_final (
    .x(acc),
    .y(s)
  );

endmodule
