// bm_unit: branch metric unit for one trellis step.
//
// From one received symbol pair (two 3-bit soft values, g1 and g0) it forms
// the soft Hamming distance to each of the four possible encoder outputs
// 00, 01, 10 and 11.  The distance of a soft value y to a hypothesised 0 is
// y itself, to a hypothesised 1 it is 7 - y, which is the bitwise inverse of
// y; so each metric is one 3-bit addition of the two values, either of them
// inverted.  The adders are ripple-carry chains of half and full adders.
//
// Timing: the four 4-bit metrics are registered, so they appear one clock
// after the symbol pair.  Reset (asynchronous, active high) clears them.
//
// The metric table, the inverter-and-adder structure and the 4-bit
// registered outputs follow the original design.  The field order of the
// output struct is this design's.
module bm_unit
  import vit_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  sym_pair_t sym,
  output bm_set_t   bm
);
  soft_t   ng1, ng0;
  bm_set_t bm_d;

  assign ng1 = ~sym.g1;
  assign ng0 = ~sym.g0;

  add3 u_add00 (.a(sym.g1), .b(sym.g0), .sum(bm_d.bm00));
  add3 u_add01 (.a(sym.g1), .b(ng0),    .sum(bm_d.bm01));
  add3 u_add10 (.a(ng1),    .b(sym.g0), .sum(bm_d.bm10));
  add3 u_add11 (.a(ng1),    .b(ng0),    .sum(bm_d.bm11));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) bm <= '0;
    else     bm <= bm_d;
  end
endmodule
