// tb_tap_delay_line - self-checking test of tap_delay_line.
//
// A 4-deep, 16-bit delay line is reset, then fed random samples with a
// random enable. A queue in the testbench models the expected taps; after
// every edge all taps are compared, including cycles where the line must
// hold, and a mid-run reset must clear every tap.
`timescale 1ns/1ps
module tb_tap_delay_line;

  localparam int W = 16;
  localparam int D = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, holds = 0, shifts = 0;

  logic         rst_n, en;
  logic [W-1:0] d;
  logic [W-1:0] tap [D];
  logic [W-1:0] model [D];

  tap_delay_line #(.W(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .tap(tap)
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    d     = '0;
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      rst_n = (t != 1000);
      en    = ($urandom % 4) != 0;
      d     = W'($urandom);
      @(posedge clk);
      if (!rst_n) begin
        for (int i = 0; i < D; i++) model[i] = '0;
      end else if (en) begin
        for (int i = D - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = d;
        shifts++;
      end else begin
        holds++;
      end
      #1;
      for (int i = 0; i < D; i++) begin
        checks++;
        if (tap[i] !== model[i]) begin
          failures++;
          $display("FAIL t=%0d tap[%0d]=%h exp=%h", t, i, tap[i], model[i]);
        end
      end
    end
    checks++;
    if (holds == 0 || shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
