// sse_unit: survivor state estimation.
//
// Finds which of the four final path metrics is smallest, giving the state
// from which trace-back starts.  To keep the path short it does not chain
// comparisons: all six pairwise comparisons are made in parallel (each the
// sign of a 7-bit modulo difference, as in the ACS units) and a small select
// function turns the six results into a 2-bit state index.  On a tie the
// lower state index wins.
//
// Timing: the selected state is registered, one clock after the metrics.
// Reset (asynchronous, active high) clears it to state 00.
//
// The six parallel comparisons and the registered 2-bit output follow
// the original design.  The tie rule and the exact select equations are this
// design's.
module sse_unit
  import vit_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  pm_t    pm [NSTATE],
  output state_t best
);
  // cIJ = 1 when metric J is strictly smaller than metric I
  logic c01, c02, c03, c12, c13, c23;
  state_t sel;

  assign c01 = pm_less(pm[1], pm[0]);
  assign c02 = pm_less(pm[2], pm[0]);
  assign c03 = pm_less(pm[3], pm[0]);
  assign c12 = pm_less(pm[2], pm[1]);
  assign c13 = pm_less(pm[3], pm[1]);
  assign c23 = pm_less(pm[3], pm[2]);

  always_comb begin
    if (!c01 && !c02 && !c03)     sel = 2'd0;
    else if (c01 && !c12 && !c13) sel = 2'd1;
    else if (c02 && c12 && !c23)  sel = 2'd2;
    else                          sel = 2'd3;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) best <= '0;
    else     best <= sel;
  end
endmodule
