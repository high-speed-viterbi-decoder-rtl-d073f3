// acs2: two-way add-compare-select unit for one trellis state.
//
// It adds the branch metric of each of the two incoming branches to the path
// metric of the state the branch leaves, keeps the smaller sum as the new
// path metric and reports which branch won (d = 0: branch 0, d = 1:
// branch 1; a tie keeps branch 0).  Path metrics are 7 bits and wrap
// around: the sums simply drop their carry and are compared through the
// sign bit of their 7-bit difference, so no metric normalisation is needed.
//
// Timing: metric and decision are registered, one clock after the inputs.
// Reset (asynchronous, active high) clears them.
//
// The add-compare-select function, the 7-bit width and the modulo
// comparison follow the original design.  Its HDL compared the sums as 8-bit
// unsigned numbers, which can choose wrongly once a metric wraps.  The sign of
// the 7-bit difference used here is this design's choice, and so is the tie
// rule.
module acs2
  import vit_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  pm_t  pm0,   // path metric of predecessor 0
  input  bm_t  bm0,   // branch metric from predecessor 0
  input  pm_t  pm1,   // path metric of predecessor 1
  input  bm_t  bm1,   // branch metric from predecessor 1
  output pm_t  pm,
  output logic d
);
  pm_t  sum0, sum1;
  logic take1;

  assign sum0  = pm0 + pm_t'(bm0);
  assign sum1  = pm1 + pm_t'(bm1);
  assign take1 = pm_less(sum1, sum0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pm <= '0;
      d  <= 1'b0;
    end else begin
      pm <= take1 ? sum1 : sum0;
      d  <= take1;
    end
  end
endmodule
