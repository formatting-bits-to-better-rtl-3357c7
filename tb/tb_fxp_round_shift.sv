// tb_fxp_round_shift - self-checking test of fxp_round_shift.
//
// Three instances cover a right shift with truncation, a right shift with
// round-to-nearest (both wrapping a 16-bit input onto 9 bits) and a left
// shift (zero padding). Random and corner inputs are applied once per cycle;
// the expected values are computed in real arithmetic (floor of x/2^s, of
// x/2^s + 1/2, and x*2^s), then wrapped to the output width.
`timescale 1ns/1ps
module tb_fxp_round_shift;
  import bitfmt_pkg::*;

  localparam int WI = 16;
  localparam int WO = 9;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [WI-1:0] x;
  logic signed [WO-1:0] y_tr, y_rn;
  logic signed [WI+1:0] y_ls;

  fxp_round_shift #(.W_IN(WI), .W_OUT(WO), .SHIFT(5),  .MODE(RND_TRUNC))   dut_tr (.x(x), .y(y_tr));
  fxp_round_shift #(.W_IN(WI), .W_OUT(WO), .SHIFT(5),  .MODE(RND_NEAREST)) dut_rn (.x(x), .y(y_rn));
  fxp_round_shift #(.W_IN(WI), .W_OUT(WI+2), .SHIFT(-2), .MODE(RND_NEAREST)) dut_ls (.x(x), .y(y_ls));

  // wrap an integer onto w bits, two's complement
  function automatic longint wrap(longint v, int w);
    longint m;
    m = longint'(1) << w;
    v = ((v % m) + m) % m;
    if (v >= (m >> 1)) v -= m;
    return v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%0d got=%0d exp=%0d", what, x, got, exp);
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
    longint e_tr, e_rn, e_ls;
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: x = 16'sh7fff;
        1: x = 16'sh8000;
        2: x = 16'sd16;     // exact tie for nearest: 0.5 -> 1
        3: x = -16'sd16;    // tie -0.5 -> 0 (half up)
        4: x = 16'sd0;
        5: x = -16'sd1;
        default: x = WI'($urandom);
      endcase
      #1;
      e_tr = longint'($floor(real'(x) / 32.0));
      e_rn = longint'($floor(real'(x) / 32.0 + 0.5));
      e_ls = longint'(x) * 4;
      check("trunc",   y_tr, wrap(e_tr, WO));
      check("nearest", y_rn, wrap(e_rn, WO));
      check("lshift",  y_ls, wrap(e_ls, WI+2));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
