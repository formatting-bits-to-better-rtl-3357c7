// tb_mod_sum_tree - self-checking test of mod_sum_tree.
//
// A 9-input 20-bit tree (the filter's accumulator) and a 5-input 8-bit tree
// get random terms each cycle; the expected sum is the integer sum reduced
// modulo 2^W. Terms are chosen so that intermediate overflow is frequent;
// the test counts how often the plain sum left the W-bit signed range, to
// show that the wrap-around was exercised. Two directed cases on the 8-bit
// tree: 12.5 + 3.75 on format (4,-3) (integers 100 + 30) wraps to -15.75
// (integer -126), and 104 + 82 - 94 gives 92 although 104 + 82 overflows.
`timescale 1ns/1ps
module tb_mod_sum_tree;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0;

  logic [19:0] xa [9];
  logic [19:0] sa;
  logic [7:0]  xb [5];
  logic [7:0]  sb;

  mod_sum_tree #(.W(20), .N(9)) dut_a (.x(xa), .s(sa));
  mod_sum_tree #(.W(8),  .N(5)) dut_b (.x(xb), .s(sb));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic directed(logic [7:0] a, logic [7:0] b, logic [7:0] c, logic [7:0] exp);
    xb[0] = a; xb[1] = b; xb[2] = c; xb[3] = '0; xb[4] = '0;
    for (int i = 0; i < 9; i++) xa[i] = '0;
    #1;
    checks++;
    if (sb !== exp) begin
      failures++;
      $display("FAIL directed %0d+%0d+%0d got=%0d exp=%0d",
               $signed(a), $signed(b), $signed(c), $signed(sb), $signed(exp));
    end
    @(posedge clk);
  endtask

  initial begin
    longint ea, eb;
    directed(8'sd100, 8'sd30, 8'sd0, -8'sd126);   // 12.5 + 3.75 -> -15.75
    directed(8'sd104, 8'sd82, -8'sd94, 8'sd92);   // 104 + 82 - 94 = 92
    for (int t = 0; t < 3000; t++) begin
      ea = 0;
      eb = 0;
      for (int i = 0; i < 9; i++) begin
        xa[i] = 20'($urandom);
        ea += longint'($signed(xa[i]));
      end
      for (int i = 0; i < 5; i++) begin
        xb[i] = 8'($urandom);
        eb += longint'($signed(xb[i]));
      end
      if (ea < -(1 << 19) || ea >= (1 << 19)) wraps++;
      #1;
      checks++;
      if (sa !== 20'(ea)) begin
        failures++;
        $display("FAIL W=20 got=%h exp=%h", sa, 20'(ea));
      end
      checks++;
      if (sb !== 8'(eb)) begin
        failures++;
        $display("FAIL W=8 got=%h exp=%h", sb, 8'(eb));
      end
      @(posedge clk);
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrap-around exercised");
    end
    $display("wrapping sums: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
