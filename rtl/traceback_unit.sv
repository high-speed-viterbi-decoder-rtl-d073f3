// traceback_unit: one step of the unrolled trace-back.
//
// Given the estimated state S(n) = {S1, S0} and the decision vector of the
// trellis step that produced it, the previous state is
//   S(n-1) = {S(n)[0], d[S(n)]}
// i.e. the state shifted left by one with the selected decision bit shifted
// in.  Bit 1 of S(n-1) is the input bit that led into S(n-1), which is the
// decoded bit of this step.
//
// Timing: S(n-1) is registered, one clock after the inputs.  Reset
// (asynchronous, active high) clears it to state 00.
//
// The recursion and the one-register stage follow the original design.
// Writing it as a 4:1 decision select plus a shift is this design's
// implementation.
module traceback_unit
  import vit_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  state_t state_in,   // S(n)
  input  dec_t   dec,        // decisions of the step into S(n)
  output state_t state_out,  // S(n-1), registered
  output logic   bit_out     // decoded bit, state_out[1]
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_out <= '0;
    else     state_out <= {state_in[0], dec[state_in]};
  end

  assign bit_out = state_out[1];
endmodule
