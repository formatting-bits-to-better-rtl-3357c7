// tb_df1_bitfmt_filter - end-to-end test of the Butterworth Direct Form I
// filter at its default parameters (16-bit data, 20-bit accumulator).
//
// Stimulus, one sample per accepted cycle, u on (4,-11) within [-13, 13]:
//   phase 0: uniform white noise;
//   phase 1: a +-13 square wave of period 64, which drives y near its peak
//            and makes products and partial sums exceed the 20-bit window;
//   phase 2: white noise again with a random 30 % of idle cycles;
//   then a reset in mid-stream and a last burst of noise.
// References, all computed in the testbench:
//   * a bit-exact integer model of the formatted sum (floor(C_i v_i / 2^d_i),
//     sum modulo 2^20, arithmetic shift by 4), fed with the DUT's own history;
//   * the exact sum of products, in 64-bit integers, on the same history: the
//     per-sample error e(k) must lie in [-1.4645302e-3, 0];
//   * a double-precision Direct Form I filter with the same quantized
//     constants: y_out - y_ref must stay in [-8.52445240e-2, 1.26555189e-2].
// It also checks the one-cycle latency (out_valid), that y_out holds while
// idle, and counts each mechanism: truncated product bits, products wrapped
// by MSB formatting, wrapped partial sums, non-zero bits dropped by the final
// shift, idle cycles and reset; one that never happened is a failure.
`timescale 1ns/1ps
module tb_df1_bitfmt_filter;
  import bitfmt_pkg::*;

  localparam int N = 9;
  localparam longint CI [N] = '{22280, 22280, 16710, 22280, 22280, 23520, -26282, 26781, -20887};
  localparam int     LP [N] = '{-35, -33, -32, -33, -35, -23, -23, -24, -26};  // product LSBs
  localparam int     DSH [N] = '{21, 19, 18, 19, 21, 9, 9, 10, 12};         // -14 - LP
  localparam int     NSAMP = 6000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lsb_drop = 0, n_msb_wrap = 0, n_sum_wrap = 0, n_final_drop = 0;
  int n_idle = 0, n_reset = 0, n_accept = 0;

  logic               rst_n, in_valid, out_valid;
  logic signed [15:0] u_in, y_out;

  df1_bitfmt_filter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u_in(u_in),
    .out_valid(out_valid), .y_out(y_out)
  );

  // integer history of the fixed-point filter and real history of the reference
  longint uh [5];     // u(k) .. u(k-4), integers on (4,-11)
  longint yh [4];     // y(k-1) .. y(k-4), integers on (5,-10)
  real    ur [5];
  real    yr [4];
  real    cr [N];     // quantized constants as reals

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic longint wrap(longint x, int w);
    longint m;
    m = longint'(1) << w;
    x = ((x % m) + m) % m;
    if (x >= (m >> 1)) x -= m;
    return x;
  endfunction

  task automatic clear_history();
    for (int i = 0; i < 5; i++) begin uh[i] = 0; ur[i] = 0.0; end
    for (int i = 0; i < 4; i++) begin yh[i] = 0; yr[i] = 0.0; end
  endtask

  initial begin
    repeat (3 * NSAMP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v [N];
    longint t_i, acc, part, exact, y_model;
    real    e_k, y_ref, dy, dy_min, dy_max;
    logic signed [15:0] y_hold;
    int     phase;

    for (int i = 0; i < N; i++) cr[i] = real'(CI[i]) * 2.0**(LP[i] - (i < 5 ? -11 : -10));
    clear_history();
    dy_min = 0.0;
    dy_max = 0.0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    u_in     = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < NSAMP; k++) begin
      phase = (k < 2000) ? 0 : (k < 4000) ? 1 : 2;
      @(negedge clk);
      // mid-stream reset: the filter must return to rest
      if (k == 5000) begin
        rst_n = 1'b0;
        in_valid = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        clear_history();
        n_reset++;
        @(negedge clk);
        check("out_valid low after reset", out_valid == 1'b0);
        check("y_out zero after reset", y_out == 0);
      end
      // idle cycles
      if (phase == 2) begin
        y_hold = y_out;
        while (($urandom % 10) < 3) begin
          in_valid = 1'b0;
          @(negedge clk);
          n_idle++;
          check("y_out holds while idle", y_out == y_hold);
          check("out_valid low while idle", out_valid == 1'b0);
        end
      end
      // next input sample on (4,-11), within [-13, 13]
      if (phase == 1)
        u_in = ((k / 32) % 2) ? 16'sd26624 : -16'sd26624;
      else
        u_in = 16'($signed(int'($urandom % 53249)) - 26624);
      in_valid = 1'b1;

      // expected value
      for (int i = 4; i > 0; i--) begin uh[i] = uh[i-1]; ur[i] = ur[i-1]; end
      uh[0] = longint'(u_in);
      ur[0] = real'(u_in) * 2.0**(-11);
      for (int i = 0; i < 5; i++) v[i] = uh[i];
      for (int i = 0; i < 4; i++) v[5 + i] = yh[i];
      acc = 0;
      part = 0;
      exact = 0;
      for (int i = 0; i < N; i++) begin
        t_i = (CI[i] * v[i]) >>> DSH[i];                 // floor division
        if ((t_i <<< DSH[i]) != CI[i] * v[i]) n_lsb_drop++;
        if (t_i != wrap(t_i, 20)) n_msb_wrap++;
        part += wrap(t_i, 20);
        if (part != wrap(part, 20)) n_sum_wrap++;
        acc = wrap(acc + t_i, 20);
        exact += (CI[i] * v[i]) <<< (LP[i] + 35);        // LSB -35
      end
      if ((acc & 15) != 0) n_final_drop++;
      y_model = wrap(acc >>> 4, 16);
      y_ref = 0.0;
      for (int i = 0; i < 5; i++) y_ref += cr[i] * ur[i];
      for (int i = 0; i < 4; i++) y_ref += cr[5 + i] * yr[i];

      @(posedge clk);
      n_accept++;
      #1;
      check("out_valid one cycle after the sample", out_valid == 1'b1);
      check($sformatf("bit-exact k=%0d got=%0d exp=%0d", k, y_out, y_model),
            longint'(y_out) == y_model);
      e_k = real'(y_out) * 2.0**(-10) - real'(exact) * 2.0**(-35);
      check($sformatf("e(k) in [-1.4645302e-3, 0] k=%0d e=%g", k, e_k),
            e_k >= -1.4645302e-3 - 1e-12 && e_k <= 1e-12);
      dy = real'(y_out) * 2.0**(-10) - y_ref;
      if (dy < dy_min) dy_min = dy;
      if (dy > dy_max) dy_max = dy;
      check($sformatf("output error bound k=%0d dy=%g", k, dy),
            dy >= -8.52445240e-2 && dy <= 1.26555189e-2);
      for (int i = 3; i > 0; i--) begin yh[i] = yh[i-1]; yr[i] = yr[i-1]; end
      yh[0] = longint'(y_out);
      yr[0] = y_ref;
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);

    $display("accepted %0d samples; output error range [%g, %g]", n_accept, dy_min, dy_max);
    $display("mechanisms: truncated product bits %0d, wrapped products %0d, wrapped partial sums %0d,",
             n_lsb_drop, n_msb_wrap, n_sum_wrap);
    $display("            final-shift bits dropped %0d, idle cycles %0d, resets %0d",
             n_final_drop, n_idle, n_reset);
    check("LSB formatting exercised", n_lsb_drop > 0);
    check("MSB formatting wrapped a product", n_msb_wrap > 0);
    check("a partial sum wrapped", n_sum_wrap > 0);
    check("final shift dropped bits", n_final_drop > 0);
    check("idle cycles exercised", n_idle > 0);
    check("reset exercised", n_reset > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
