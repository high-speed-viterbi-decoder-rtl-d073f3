// sbvd_unit: the decoding core of a sliding block Viterbi decoder, without
// the channel symbol pipelines.  One block of N = 4L symbol pairs enters per
// clock and M = 2L decoded bits leave per clock.
//
// The block's trellis is unrolled into N stages (acs4) that start from
// all-zero path metrics.  After the last stage the survivor state estimator
// picks the best final state.  An unrolled chain of N - 1 - L trace-back units
// then walks back through the stored decisions.  The first L trace-back steps
// only let the survivor paths merge.  The next M steps give the M decoded
// bits, which are symbols L .. L+M-1 of the block.  The first L trellis stages
// serve as the synchronisation length, so their decisions are never read.
//
// Skew buffers re-time the decisions and the result:
//   - the decisions of stage N - k are delayed 2k - 1 clocks to meet
//     trace-back step k (k = 1 .. N - 1 - L);
//   - decoded bit i leaves trace-back step N - 1 - L - i and is delayed i
//     clocks, so that all M bits leave together.
//
// Interface and timing: xs[s] is the symbol pair for trellis stage s.  For a
// block that starts at clock t, xs[s] must hold that block's symbol s at
// clock t + s.  The caller's symbol pipelines provide this skew, and they can
// share their registers between overlapping blocks (see sbvd_decoder and
// sbvd_dual_decoder).  y[0..M-1] (y[0] earliest in time) holds block symbols
// L .. L+M-1 at clock t + 2N + 1 - L.  There is no handshake: the pipeline
// runs every clock.  Reset is asynchronous and active high and clears every
// register.
//
// Block length, stage structure, buffer depths and widths are those of the
// original design.  Splitting the core from the symbol pipelines, so that
// one core serves both the one-unit and the two-unit decoder, is this
// implementation's choice.
module sbvd_unit
  import vit_pkg::*;
#(
  parameter int L = 6               // survivor / synchronisation length
) (
  input  logic             clk,
  input  logic             rst,
  input  sym_pair_t        xs [4*L], // stage s symbol, skewed by s clocks
  output logic [2*L-1:0]   y         // M decoded bits, y[0] first in time
);
  localparam int M   = 2 * L;         // decoded bits per block
  localparam int N   = 2 * M;         // trellis stages per block (2L + M)
  localparam int NTB = N - 1 - L;     // trace-back steps

  // ---------------------------------------------------------------- trellis
  pm_t  pm  [N+1][NSTATE];   // pm[0]: zero start metrics, pm[s+1]: stage s out
  dec_t dec [N];

  for (genvar i = 0; i < NSTATE; i++) begin : g_pm0
    assign pm[0][i] = '0;
  end

  for (genvar s = 0; s < N; s++) begin : g_stage
    acs4 u_acs4 (.clk, .rst, .sym(xs[s]), .pm_in(pm[s]),
                 .pm_out(pm[s+1]), .dec(dec[s]));
  end

  // ------------------------------------------------- survivor state estimate
  state_t tb_state [NTB+1];   // tb_state[0]: SSE output, [k]: after step k
  logic   tb_bit   [NTB+1];

  sse_unit u_sse (.clk, .rst, .pm(pm[N]), .best(tb_state[0]));
  assign tb_bit[0] = 1'b0;    // the SSE gives a start state, not a bit

  // -------------------------------------------------------------- trace-back
  for (genvar k = 1; k <= NTB; k++) begin : g_tb
    dec_t dec_skewed;
    skew_buffer #(.W(NSTATE), .D(2*k-1)) u_dec (
      .clk, .rst, .din(dec[N-k]), .dout(dec_skewed));
    traceback_unit u_tb (.clk, .rst, .state_in(tb_state[k-1]), .dec(dec_skewed),
                         .state_out(tb_state[k]), .bit_out(tb_bit[k]));
  end

  // ------------------------------------------------------------ output skew
  for (genvar i = 0; i < M; i++) begin : g_out
    if (i == 0) begin : g_direct
      assign y[i] = tb_bit[NTB];
    end else begin : g_skew
      skew_buffer #(.W(1), .D(i)) u_out (
        .clk, .rst, .din(tb_bit[NTB - i]), .dout(y[i]));
    end
  end

endmodule
