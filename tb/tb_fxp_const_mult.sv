// tb_fxp_const_mult - self-checking test of fxp_const_mult.
//
// Four multipliers with constants and shifts of the Butterworth example
// (b_0: 22280 >> 21, -a_2: -26282 >> 9, -a_3: 26781 >> 10 rounded to
// nearest on a narrow 12-bit window, and -a_4: -20887 padded by 3 zeros).
// Each cycle a random 16-bit variable is applied; the expected formatted
// product is floor or nearest of C*v/2^s computed in real arithmetic and
// wrapped onto the output width.
`timescale 1ns/1ps
module tb_fxp_const_mult;
  import bitfmt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [15:0] v;
  logic signed [19:0] p0, p1;
  logic signed [11:0] p2;
  logic signed [35:0] p3;

  fxp_const_mult #(.C(16'sd22280),  .SHIFT(21), .W_OUT(20), .MODE(RND_TRUNC))   dut0 (.v(v), .p(p0));
  fxp_const_mult #(.C(-16'sd26282), .SHIFT(9),  .W_OUT(20), .MODE(RND_TRUNC))   dut1 (.v(v), .p(p1));
  fxp_const_mult #(.C(16'sd26781),  .SHIFT(10), .W_OUT(12), .MODE(RND_NEAREST)) dut2 (.v(v), .p(p2));
  fxp_const_mult #(.C(-16'sd20887), .SHIFT(-3), .W_OUT(36), .MODE(RND_TRUNC))   dut3 (.v(v), .p(p3));

  function automatic longint wrap(longint x, int w);
    longint m;
    m = longint'(1) << w;
    x = ((x % m) + m) % m;
    if (x >= (m >> 1)) x -= m;
    return x;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s v=%0d got=%0d exp=%0d", what, v, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pr;
    for (int t = 0; t < 4000; t++) begin
      case (t)
        0: v = 16'sh7fff;
        1: v = 16'sh8000;
        2: v = 16'sd0;
        3: v = -16'sd1;
        default: v = 16'($urandom);
      endcase
      #1;
      pr = real'(v);
      check("b0 >>21",    longint'(p0), wrap(longint'($floor(22280.0 * pr / 2097152.0)), 20));
      check("-a2 >>9",    longint'(p1), wrap(longint'($floor(-26282.0 * pr / 512.0)), 20));
      check("-a3 rn>>10", longint'(p2), wrap(longint'($floor(26781.0 * pr / 1024.0 + 0.5)), 12));
      check("-a4 <<3",    longint'(p3), wrap(longint'(-20887) * longint'(v) * 8, 36));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
