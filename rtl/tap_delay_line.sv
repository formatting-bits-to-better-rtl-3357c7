// tap_delay_line - tapped delay line of the Direct Form I filter.
//
// Holds the DEPTH most recent accepted samples: tap[0] is x(k-1),
// tap[DEPTH-1] is x(k-DEPTH). When en is high on a rising clock edge, d is
// shifted in at tap[0] and the oldest sample falls out; otherwise the taps
// hold. A synchronous active-low reset clears every tap to zero, which is the
// filter's initial rest state.
//
// Interface: clk, rst_n, en, d (W bits) in; tap[DEPTH] (W bits each) out.
// Timing: one register stage per tap, updated on the edge where en = 1.
// The delay structure comes from the Direct Form I recursion; reset value
// and enable are this design's choice.
module tap_delay_line #(
  parameter int W     = 16,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] tap [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) tap[i] <= '0;
    end else if (en) begin
      tap[0] <= d;
      for (int i = 1; i < DEPTH; i++) tap[i] <= tap[i-1];
    end
  end

endmodule
