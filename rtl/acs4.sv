// acs4: one complete trellis stage of the four-state code.
//
// A branch metric unit turns the stage's symbol pair into the four branch
// metrics; four two-way ACS units then update the four path metrics.  With
// state j = {S1, S0} and predecessors {j[0], 0} and {j[0], 1}, the branches
// carry these encoder outputs (g1 g0):
//   state 00 <- 00 via 00, <- 01 via 11      state 10 <- 00 via 11, <- 01 via 00
//   state 01 <- 10 via 10, <- 11 via 01      state 11 <- 10 via 01, <- 11 via 10
//
// Timing: two pipeline stages.  The branch metrics are registered one clock
// after `sym`; path metrics and decisions are registered one clock after
// that.  So `sym` must arrive one clock before the `pm_in` it belongs with,
// and `pm_out`/`dec` appear one clock after `pm_in`.
//
// The two register stages, the branch wiring and the
// decision-vector output follow the original design.  The state numbering
// {S1, S0} is this design's way of writing it down.
module acs4
  import vit_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  sym_pair_t sym,
  input  pm_t       pm_in  [NSTATE],
  output pm_t       pm_out [NSTATE],
  output dec_t      dec
);
  bm_set_t bm;

  bm_unit u_bm (.clk, .rst, .sym, .bm);

  acs2 u_acs0 (.clk, .rst, .pm0(pm_in[0]), .bm0(bm.bm00), .pm1(pm_in[1]), .bm1(bm.bm11),
               .pm(pm_out[0]), .d(dec[0]));
  acs2 u_acs1 (.clk, .rst, .pm0(pm_in[2]), .bm0(bm.bm10), .pm1(pm_in[3]), .bm1(bm.bm01),
               .pm(pm_out[1]), .d(dec[1]));
  acs2 u_acs2 (.clk, .rst, .pm0(pm_in[0]), .bm0(bm.bm11), .pm1(pm_in[1]), .bm1(bm.bm00),
               .pm(pm_out[2]), .d(dec[2]));
  acs2 u_acs3 (.clk, .rst, .pm0(pm_in[2]), .bm0(bm.bm01), .pm1(pm_in[3]), .bm1(bm.bm10),
               .pm(pm_out[3]), .d(dec[3]));
endmodule
