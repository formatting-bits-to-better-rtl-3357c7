// tb_bitfmt_sop - self-checking test of bitfmt_sop.
//
// dut_tr : the Butterworth 9-term sum with truncation (the default).
// dut_rn : the same sum with round-to-nearest.
// dut_dr : a 3-term sum in which one product lies wholly below the guard
//          bits, so the guard-bit iteration must drop it and settle on
//          delta = 1 instead of ceil(log2(3)) = 2.
// The exact sum is computed in 64-bit integers at the smallest product LSB.
// Checks: the guard-bit count and accumulator width; with truncation the
// output is floor(s) or one LSB below it (a faithful rounding of the truncated
// sum), with round-to-nearest it is floor(s) or ceil(s); the error lies
// in the interval the method predicts, [-1.4645302e-3, 0] for truncation
// (value given for the example), and in (-2^l_f, 2^l_f) for round-to-nearest.
// Random inputs whose exact sum leaves the output range are skipped, since the
// method assumes the final format holds the result.
`timescale 1ns/1ps
module tb_bitfmt_sop;
  import bitfmt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, skipped = 0, not_nearest = 0;

  localparam int N = 9;
  localparam int CI [N] = '{22280, 22280, 16710, 22280, 22280, 23520, -26282, 26781, -20887};
  localparam int LC [N] = '{-24, -22, -21, -22, -24, -13, -13, -14, -16};
  localparam int LV [N] = '{-11, -11, -11, -11, -11, -10, -10, -10, -10};
  localparam int LMIN = -35;

  logic signed [15:0] v [N];
  logic signed [15:0] s_tr, s_rn;

  bitfmt_sop dut_tr (.v(v), .s(s_tr));
  bitfmt_sop #(.MODE(RND_NEAREST)) dut_rn (.v(v), .s(s_rn));

  // 8-bit constants and variables: terms 0 and 1 have LSB -8 (below L_F = 0),
  // term 2 has MSB -12 < L_F - 2 and is dropped.
  localparam int C3  [3] = '{100, -77, 90};
  localparam int LC3 [3] = '{-4, -4, -20};
  localparam int LV3 [3] = '{-4, -4, -7};
  logic signed [7:0] w [3];
  logic signed [7:0] s_dr;
  bitfmt_sop #(
    .N(3), .W_C(8), .W_V(8),
    .C_INT(C3), .L_C(LC3), .L_V(LV3),
    .M_F(7), .L_F(0), .MODE(RND_TRUNC)
  ) dut_dr (.v(w), .s(s_dr));

  function automatic longint floor_div(longint a, int sh);
    return a >>> sh;   // arithmetic shift of a 64-bit integer is floor division
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ex, lo, hi;
    real err, e_lo;
    e_lo = -1.4645302e-3;
    check("delta of the example is 4", dut_tr.DELTA == 4);
    check("accumulator is 20 bits", dut_tr.W_ACC == 20);
    check("delta after dropping a term is 1", dut_dr.DELTA == 1);
    for (int t = 0; t < 6000; t++) begin
      // variables: half the time full-range, else small to keep the sum in range
      for (int i = 0; i < N; i++)
        v[i] = (t % 2) ? 16'($urandom) : 16'($signed(16'($urandom)) >>> 3);
      ex = 0;
      for (int i = 0; i < N; i++)
        ex += (longint'(CI[i]) * longint'(v[i])) <<< (LC[i] + LV[i] - LMIN);
      #1;
      if (ex < -(longint'(32) <<< 35) || ex >= (longint'(32) <<< 35)) begin
        skipped++;
      end else begin
        lo = floor_div(ex, 25);                       // output LSB is -10
        hi = ((lo <<< 25) == ex) ? lo : lo + 1;
        check($sformatf("faithful trunc t=%0d got=%0d lo=%0d", t, s_tr, lo),
              longint'(s_tr) == lo || longint'(s_tr) == lo - 1);
        check($sformatf("faithful nearest t=%0d got=%0d lo=%0d", t, s_rn, lo),
              longint'(s_rn) == lo || longint'(s_rn) == hi);
        err = real'(s_tr) * 2.0**(-10) - real'(ex) * 2.0**(-35);
        check($sformatf("trunc error %g", err), err >= e_lo - 1e-12 && err <= 0.0);
        err = real'(s_rn) * 2.0**(-10) - real'(ex) * 2.0**(-35);
        check($sformatf("nearest error %g", err), err > -(2.0**(-10)) && err < 2.0**(-10));
        if (longint'(s_tr) != lo) not_nearest++;
      end
      for (int i = 0; i < 3; i++) w[i] = 8'($urandom);
      ex = (longint'(100) * w[0] + longint'(-77) * w[1]);   // LSB -8
      #1;
      if (ex >= -(longint'(128) <<< 8) && ex < (longint'(128) <<< 8)) begin
        lo = floor_div(ex, 8);
        hi = ((lo <<< 8) == ex) ? lo : lo + 1;
        check($sformatf("faithful 3-term got=%0d lo=%0d", s_dr, lo),
              longint'(s_dr) == lo || longint'(s_dr) == lo - 1);
      end
      @(posedge clk);
    end
    $display("skipped %0d out-of-range sums; %0d truncated results one LSB below floor(s)",
             skipped, not_nearest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
