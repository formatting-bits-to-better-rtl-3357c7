// mod_sum_tree - modular sum of N words in a balanced adder tree.
//
// All inputs share one fixed-point format, so no alignment shift is needed
// and the addition order does not change the result. Each adder is W bits
// wide and wraps modulo 2^W: intermediate sums may overflow, but by
// two's-complement wrap-around (Jackson's rule) the final sum is right
// whenever the exact sum fits on W bits. The tree is the most parallel
// evaluation order: ceil(log2(N)) adder levels; missing leaves are zero.
//
// Interface: x[N] (W bits each) in, s (W bits) out. Timing: combinational.
// Modular addition and the choice of the most parallel order follow the
// method; the tree shape (pairs of neighbours, zero padding) is this
// design's choice.
module mod_sum_tree
  import bitfmt_pkg::*;
#(
  parameter int W = 20,
  parameter int N = 9
) (
  input  logic [W-1:0] x [N],
  output logic [W-1:0] s
);

  localparam int LEVELS = (N > 1) ? ceil_log2(N) : 0;
  localparam int NP     = 1 << LEVELS;

  // node[k][j]: j-th partial sum at level k (level 0 are the leaves)
  logic [W-1:0] node [LEVELS+1][NP];

  always_comb begin
    for (int j = 0; j < NP; j++)
      node[0][j] = (j < N) ? x[j] : '0;
    for (int k = 1; k <= LEVELS; k++) begin
      for (int j = 0; j < NP; j++) node[k][j] = '0;
      for (int j = 0; j < (NP >> k); j++)
        node[k][j] = node[k-1][2*j] + node[k-1][2*j+1];
    end
  end

  assign s = node[LEVELS][0];

endmodule
