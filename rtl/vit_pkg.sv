// vit_pkg: types and constants shared by the sliding block Viterbi decoder.
//
// The code is the rate 1/2, constraint length K = 3 convolutional code with
// generators g1 = 111 and g0 = 101 (four trellis states).  Each received code
// bit is a 3-bit soft-decision value (000 = confident 0, 111 = confident 1).
// A branch metric is the sum of two 3-bit soft Hamming distances (0..14, four
// bits).  Path metrics are seven bits wide and are allowed to wrap around:
// two metrics are compared through the sign of their difference modulo 2^7,
// which is exact as long as the metrics differ by less than 64.
//
// A state is written {S1, S0}: S1 is the most recent input bit and S0 the
// one before it.  The predecessors of state j are {j[0], 0} and {j[0], 1};
// decision bit d[j] tells which of the two survived.
//
// The code, the soft-decision format and the widths follow the original
// design.  The package, the struct types and the pm_less helper are this
// design's way of sharing them.
package vit_pkg;

  localparam int SYM_W  = 3;   // soft-decision bits per code bit
  localparam int BM_W   = 4;   // branch metric width (0..14)
  localparam int PM_W   = 7;   // path metric width, modulo 2^7
  localparam int NSTATE = 4;   // 2^(K-1) trellis states

  typedef logic [SYM_W-1:0] soft_t;
  typedef logic [BM_W-1:0]  bm_t;
  typedef logic [PM_W-1:0]  pm_t;
  typedef logic [1:0]       state_t;
  typedef logic [NSTATE-1:0] dec_t;   // one decision bit per state

  // One received channel symbol pair: the soft values of g1 and g0.
  typedef struct packed {
    soft_t g1;
    soft_t g0;
  } sym_pair_t;

  // The four branch metrics, named after the hypothesised pair (g1 g0).
  typedef struct packed {
    bm_t bm00;
    bm_t bm01;
    bm_t bm10;
    bm_t bm11;
  } bm_set_t;

  // Modulo comparison: 1 when b is strictly smaller than a, that is when
  // (b - a) mod 2^PM_W has its sign bit set.
  function automatic logic pm_less(input pm_t b, input pm_t a);
    pm_t diff;
    diff = b - a;
    return diff[PM_W-1];
  endfunction

endpackage
