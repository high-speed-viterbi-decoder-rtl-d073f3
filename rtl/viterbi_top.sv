// viterbi_top: the 12-bit sliding block Viterbi decoders for the rate 1/2,
// K = 3 code (g1 = 111, g0 = 101), with the matching convolutional encoder
// placed beside them.
//
// The main decoder (sbvd_decoder, L = 6, M = 12) takes twelve received 3-bit
// soft symbol pairs per clock.  It returns twelve decoded bits per clock,
// 43 clocks later.  At the 12 ns clock the design targets, this is 1 Gbit/s.
// The second decoder (sbvd_dual_decoder) is the alternative with the
// same throughput, built from two 6-bit units with L = 3.  It takes the same
// kind of twelve-pair row on its own ports.  It returns message bits
// 12t + 3 .. 12t + 14 for row t, 22 clocks later.  The main decoder returns
// bits 12t + 6 .. 12t + 17.  The two decoders share clock and reset but
// nothing else.
//
// The encoder is independent hardware with its own clock and reset.  It
// turns a bit stream into the serial channel-symbol stream g1, g0, g1, ...
// The serial/parallel converters that would join it to a decoder are not
// part of this design, so every block brings its ports out unchanged.
//
// The main decoder is the configuration the original design was built in.
// The two-unit decoder is its described alternative.  Placing both side by
// side in one top is this implementation's choice.
module viterbi_top
  import vit_pkg::*;
#(
  parameter int L      = 6,         // main decoder survivor length
  parameter int L_DUAL = 3          // survivor length of each two-unit half
) (
  // main decoder
  input  logic                clk,
  input  logic                rst,
  input  sym_pair_t           x      [2*L],
  output logic [2*L-1:0]      y,
  // two-unit decoder (same clock and reset)
  input  sym_pair_t           dual_x [4*L_DUAL],
  output logic [4*L_DUAL-1:0] dual_y,
  // encoder
  input  logic                enc_clk,
  input  logic                enc_rst,
  input  logic                enc_din,
  output logic                enc_in_take,
  output logic                enc_sym,
  output logic                enc_sym_is_g1
);
  sbvd_decoder #(.L(L)) u_dec (.clk, .rst, .x, .y);

  sbvd_dual_decoder #(.L(L_DUAL)) u_dual (.clk, .rst, .x(dual_x), .y(dual_y));

  conv_encoder u_enc (.clk(enc_clk), .rst(enc_rst), .din(enc_din),
                      .in_take(enc_in_take), .sym_out(enc_sym),
                      .sym_is_g1(enc_sym_is_g1));
endmodule
