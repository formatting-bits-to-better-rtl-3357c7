// tb_fix_compare - the filter's accuracy study: three guard-bit choices and
// both rounding modes run on one white-noise input in [-13, 13].
//
//   fix1 : every product bit kept (delta = 25, 41-bit accumulator)
//   fix2 : no guard bit (delta = 0, 16-bit accumulator)
//   fix3 : delta = ceil(log2 9) = 4 (the default, 20-bit accumulator)
//   fix3n: fix3 with round-to-nearest instead of truncation
// Each output is compared with a double-precision Direct Form I filter using
// the same quantized constants. Checks: the accumulator widths; that the
// output error of fix1, fix3 and fix3n stays in the interval predicted from
// the per-sample error interval e in [e_lo, e_hi] through the error filter
// 1/A(z), using its DC gain 49.5647 and worst-case peak gain 66.8474:
//   dy in [(e_hi+e_lo)/2*DC - (e_hi-e_lo)/2*PK, (e_hi+e_lo)/2*DC + (e_hi-e_lo)/2*PK];
// and that the mean error grows as guard bits are removed (fix1, fix3, fix2).
`timescale 1ns/1ps
module tb_fix_compare;
  import bitfmt_pkg::*;

  localparam int  N     = 9;
  localparam int  NSAMP = 4000;
  localparam real DC    = 49.5647;
  localparam real PK    = 66.8474;
  localparam int  CI [N] = '{22280, 22280, 16710, 22280, 22280, 23520, -26282, 26781, -20887};
  localparam int  LC [N] = '{-24, -22, -21, -22, -24, -13, -13, -14, -16};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               rst_n, in_valid;
  logic signed [15:0] u_in;
  logic               ov [4];
  logic signed [15:0] y  [4];

  df1_bitfmt_filter #(.DELTA_FORCE(25)) fix1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u_in(u_in), .out_valid(ov[0]), .y_out(y[0]));
  df1_bitfmt_filter #(.DELTA_FORCE(0))  fix2 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u_in(u_in), .out_valid(ov[1]), .y_out(y[1]));
  df1_bitfmt_filter                     fix3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u_in(u_in), .out_valid(ov[2]), .y_out(y[2]));
  df1_bitfmt_filter #(.MODE(RND_NEAREST)) fix3n (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u_in(u_in), .out_valid(ov[3]), .y_out(y[3]));

  real ur [5];
  real yr [4];
  real cr [N];
  real lo [4], hi [4];
  real sum_dy [4], max_dy [4];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3 * NSAMP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real el, eh, y_ref, dy, sum_pl;
    for (int i = 0; i < N; i++) cr[i] = real'(CI[i]) * 2.0**(LC[i]);
    // per-sample error intervals (truncated products at 2^-14, final shift)
    sum_pl = 0.0;
    for (int i = 0; i < N; i++) sum_pl += 2.0**(LC[i] + (i < 5 ? -11 : -10));
    // fix1: only the final truncation, bits down to 2^-35 kept
    el = -(2.0**(-10)) + 2.0**(-35);          eh = 0.0;
    lo[0] = (eh + el) / 2 * DC - (eh - el) / 2 * PK;  hi[0] = (eh + el) / 2 * DC + (eh - el) / 2 * PK;
    // fix3 truncation
    el = -9.0 * 2.0**(-14) + sum_pl - 2.0**(-10) + 2.0**(-14);   eh = 0.0;
    check($sformatf("e_lo of fix3 is -1.4645302e-3 (%g)", el), el > -1.46454e-3 && el < -1.46452e-3);
    lo[2] = (eh + el) / 2 * DC - (eh - el) / 2 * PK;  hi[2] = (eh + el) / 2 * DC + (eh - el) / 2 * PK;
    // fix3 round-to-nearest
    el = -9.0 * 2.0**(-15) + sum_pl - 2.0**(-11) + 2.0**(-14);
    eh =  9.0 * 2.0**(-15) + 2.0**(-11);
    lo[3] = (eh + el) / 2 * DC - (eh - el) / 2 * PK;  hi[3] = (eh + el) / 2 * DC + (eh - el) / 2 * PK;
    lo[1] = -1.0e9; hi[1] = 1.0e9;           // fix2 carries no guarantee
    for (int j = 0; j < 4; j++) begin sum_dy[j] = 0.0; max_dy[j] = 0.0; end
    for (int i = 0; i < 5; i++) ur[i] = 0.0;
    for (int i = 0; i < 4; i++) yr[i] = 0.0;

    check("fix1 accumulator 41 bits", fix1.u_sop.W_ACC == 41);
    check("fix2 accumulator 16 bits", fix2.u_sop.W_ACC == 16);
    check("fix3 accumulator 20 bits", fix3.u_sop.W_ACC == 20);

    rst_n = 1'b0; in_valid = 1'b0; u_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NSAMP; k++) begin
      @(negedge clk);
      u_in = 16'($signed(int'($urandom % 53249)) - 26624);
      in_valid = 1'b1;
      for (int i = 4; i > 0; i--) ur[i] = ur[i-1];
      ur[0] = real'(u_in) * 2.0**(-11);
      y_ref = 0.0;
      for (int i = 0; i < 5; i++) y_ref += cr[i] * ur[i];
      for (int i = 0; i < 4; i++) y_ref += cr[5 + i] * yr[i];
      @(posedge clk);
      #1;
      for (int j = 0; j < 4; j++) begin
        dy = real'(y[j]) * 2.0**(-10) - y_ref;
        sum_dy[j] += dy;
        if ((dy < 0 ? -dy : dy) > max_dy[j]) max_dy[j] = (dy < 0 ? -dy : dy);
        if (j != 1)
          check($sformatf("impl %0d k=%0d dy=%g outside [%g, %g]", j, k, dy, lo[j], hi[j]),
                dy >= lo[j] && dy <= hi[j]);
        check("out_valid", ov[j] == 1'b1);
      end
      for (int i = 3; i > 0; i--) yr[i] = yr[i-1];
      yr[0] = y_ref;
    end
    for (int j = 0; j < 4; j++)
      $display("impl %0d: mean error %g, max |error| %g, bound [%g, %g]",
               j, sum_dy[j] / NSAMP, max_dy[j], lo[j], hi[j]);
    check("fix2 worse than fix3", max_dy[1] > max_dy[2] && sum_dy[1] < sum_dy[2]);
    check("fix3 mean error below fix1's", sum_dy[2] < sum_dy[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
