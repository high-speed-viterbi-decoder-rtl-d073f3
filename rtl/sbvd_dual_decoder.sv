// sbvd_dual_decoder: a 2M-bit sliding block Viterbi decoder built from two
// M-bit decoding cores (sbvd_unit, M = 2L) that take alternate blocks.
//
// Each clock, one input row of 2M = 4L symbol pairs arrives, and the stream
// advances by two blocks.  Unit A decodes the block made of row t itself.
// Unit B decodes the block that starts half a row later: the second half of
// row t followed by the first half of row t+1.  The two units' blocks overlap
// by 2L symbols on both sides.  So every input symbol feeds both units, and
// one register chain per symbol position serves both:
//   - x[j], j < M:  stage j of unit A after j clocks, then stage j + M of
//     unit B (block of the previous row) after j + M - 1 clocks;
//   - x[M + j]:     stage j of unit B after j clocks, then stage j + M of
//     unit A after j + M clocks.
// With L = 3 this takes 96 six-bit registers for both units.  Each unit has
// half the stages of a one-unit decoder of the same throughput, and half its
// survivor length.
//
// Interface: each clock takes one row x[0..2M-1] (x[0] earliest in time) and
// gives 2M decoded bits y[0..2M-1] (y[0] earliest).  y[0..M-1] come from unit
// A: symbols L .. L+M-1 of row t.  y[M..2M-1] come from unit B: symbols
// M+L .. 2M-1 of row t, then symbols 0 .. L-1 of row t+1.  All leave together
// 2N + 1 - L clocks (22 for L = 3) after row t was taken, with N = 4L.
// There is no handshake.  Reset is asynchronous and active high.
//
// The two-unit arrangement, the alternating blocks and the shared symbol
// pipelines follow the original design's 12-bit decoder made of two 6-bit
// units (L = 3).  The register-level sharing above is this implementation's
// reading of that structure.
module sbvd_dual_decoder
  import vit_pkg::*;
#(
  parameter int L = 3               // survivor / synchronisation length per unit
) (
  input  logic             clk,
  input  logic             rst,
  input  sym_pair_t        x [4*L], // one row of 2M received symbol pairs
  output logic [4*L-1:0]   y        // 2M decoded bits, y[0] first in time
);
  localparam int M = 2 * L;         // decoded bits per unit and clock
  localparam int N = 2 * M;         // trellis stages per unit

  sym_pair_t sym_a [N];             // unit A, stage s skewed by s clocks
  sym_pair_t sym_b [N];             // unit B, stage s skewed by s clocks

  for (genvar j = 0; j < M; j++) begin : g_sym
    sym_pair_t lo_first, hi_first;  // x[j] and x[M+j] delayed j clocks
    if (j == 0) begin : g_direct
      assign lo_first = x[j];
      assign hi_first = x[M + j];
    end else begin : g_skew
      skew_buffer #(.W($bits(sym_pair_t)), .D(j)) u_lo_first (
        .clk, .rst, .din(x[j]), .dout(lo_first));
      skew_buffer #(.W($bits(sym_pair_t)), .D(j)) u_hi_first (
        .clk, .rst, .din(x[M + j]), .dout(hi_first));
    end
    skew_buffer #(.W($bits(sym_pair_t)), .D(M-1)) u_lo_second (
      .clk, .rst, .din(lo_first), .dout(sym_b[j + M]));
    skew_buffer #(.W($bits(sym_pair_t)), .D(M)) u_hi_second (
      .clk, .rst, .din(hi_first), .dout(sym_a[j + M]));
    assign sym_a[j] = lo_first;
    assign sym_b[j] = hi_first;
  end

  sbvd_unit #(.L(L)) u_unit_a (.clk, .rst, .xs(sym_a), .y(y[M-1:0]));
  sbvd_unit #(.L(L)) u_unit_b (.clk, .rst, .xs(sym_b), .y(y[2*M-1:M]));

endmodule
