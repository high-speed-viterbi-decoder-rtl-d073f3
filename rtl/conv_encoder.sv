// conv_encoder: rate 1/2, K = 3 convolutional encoder (g1 = 111, g0 = 101).
//
// Two flip-flops hold the previous two input bits s1 (x^1) and s0 (x^0).
// With the new bit x^2 the two modulo-2 adders give
//   g1 = x^2 ^ x^1 ^ x^0      g0 = x^2 ^ x^0
// and a selector running at twice the bit rate sends g1, then g0, onto the
// single channel-symbol output.
//
// Here `clk` is the channel-symbol clock (twice the bit rate) and a phase
// bit stands in for the half-rate register clock.  In phase 0 the unit
// takes `din` (signalled by `in_take`), shifts it into the register and
// outputs g1; in phase 1 it outputs the g0 it kept.  `sym_out` is
// registered, so the symbols of a bit appear one and two clocks after the
// bit was taken; `sym_is_g1` marks the first of the pair.  Reset
// (asynchronous, active high) clears the register, as the encoder is assumed
// to start in state 00.
//
// The generators, the g1-then-g0 order and the worked example it
// reproduces follow the original design.  Driving both the register and the
// selector from one clock, with a phase bit, is this design's choice, so the
// block has a single clock domain.
module conv_encoder (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic in_take,     // din is consumed in this clock
  output logic sym_out,     // serial channel symbols g1, g0, g1, g0, ...
  output logic sym_is_g1    // sym_out currently carries g1
);
  logic s1, s0, phase, g0_hold;
  logic g1, g0;

  assign g1      = din ^ s1 ^ s0;
  assign g0      = din ^ s0;
  assign in_take = ~phase;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s1        <= 1'b0;
      s0        <= 1'b0;
      phase     <= 1'b0;
      g0_hold   <= 1'b0;
      sym_out   <= 1'b0;
      sym_is_g1 <= 1'b0;
    end else begin
      phase <= ~phase;
      if (!phase) begin
        s1        <= din;
        s0        <= s1;
        g0_hold   <= g0;
        sym_out   <= g1;
        sym_is_g1 <= 1'b1;
      end else begin
        sym_out   <= g0_hold;
        sym_is_g1 <= 1'b0;
      end
    end
  end
endmodule
