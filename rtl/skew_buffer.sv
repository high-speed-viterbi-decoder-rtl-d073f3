// skew_buffer: general W x D pipeline buffer.
//
// A chain of D registers, each W bits wide, that delays its input by exactly
// D clocks (D >= 1).  The decoder uses it to re-time channel symbols
// (W = 6), decision vectors (W = 4) and decoded bits (W = 1) between the
// unrolled trellis and trace-back stages.  Reset (asynchronous, active high)
// clears every stage.
//
// The W x D register chain follows the original design.  The original
// has four variants (1 x 1, 1 x D, W x 1, W x D).  Here one parameterised
// module replaces them, which is this design's choice.
module skew_buffer #(
  parameter int W = 6,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] stage [D];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < D; i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < D; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[D-1];

  initial assert (D >= 1) else $error("skew_buffer: D must be at least 1");
endmodule
