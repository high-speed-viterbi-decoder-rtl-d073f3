// sbvd_decoder: forward-processing sliding block Viterbi decoder, one unit.
//
// The received stream is cut into blocks of 2L + M symbol pairs that overlap
// by 2L.  With M = 2L, one block is two consecutive input rows of M pairs, and
// each new row starts a new block.  This module holds the channel symbol
// pipelines.  They skew each row so that trellis stage s of a block sees the
// block's symbol s s clocks after the block starts.  The decoding core
// (sbvd_unit) takes the skewed symbols.
//
// Symbol j of a row feeds stage j of the block that starts with this row,
// after j clocks.  It also feeds stage j + M of the block that started one
// row earlier, after j + M - 1 clocks.  The second delay continues the first
// register chain (shared buffers): M chains of depth j + M - 1 instead of
// N separate chains.
//
// Interface: each clock takes one row x[0..M-1] (x[0] earliest in time) and
// gives M decoded bits y[0..M-1] (y[0] earliest).  There is no handshake:
// the pipeline runs every clock.  The bits that come out together are the
// last L bits of row t and the first L bits of row t+1.  They leave
// 2N + 1 - L clocks (43 for L = 6) after row t was taken.  Reset is
// asynchronous and active high and clears every register.
//
// The structure, stage count, buffer depths and widths are those of the
// original design.  The parameterisation by L is this implementation's.
module sbvd_decoder
  import vit_pkg::*;
#(
  parameter int L = 6               // survivor / synchronisation length
) (
  input  logic             clk,
  input  logic             rst,
  input  sym_pair_t        x [2*L], // one row of M = 2L received symbol pairs
  output logic [2*L-1:0]   y        // M decoded bits, y[0] first in time
);
  localparam int M = 2 * L;         // decoded bits per clock
  localparam int N = 2 * M;         // trellis stages per block (2L + M)

  sym_pair_t sym_first  [M];   // x[j] delayed j clocks       -> stage j
  sym_pair_t sym_second [M];   // x[j] delayed j + M - 1      -> stage j + M
  sym_pair_t stage_sym  [N];

  for (genvar j = 0; j < M; j++) begin : g_sym
    if (j == 0) begin : g_direct
      assign sym_first[j] = x[j];
    end else begin : g_skew
      skew_buffer #(.W($bits(sym_pair_t)), .D(j)) u_first (
        .clk, .rst, .din(x[j]), .dout(sym_first[j]));
    end
    skew_buffer #(.W($bits(sym_pair_t)), .D(M-1)) u_second (
      .clk, .rst, .din(sym_first[j]), .dout(sym_second[j]));
    assign stage_sym[j]     = sym_first[j];
    assign stage_sym[j + M] = sym_second[j];
  end

  sbvd_unit #(.L(L)) u_unit (.clk, .rst, .xs(stage_sym), .y);

endmodule
