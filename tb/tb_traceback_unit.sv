// tb_traceback_unit: checks one trace-back step against the state
// transition map of the code.  For state S and decisions d the unit must
// return the predecessor P that (a) can reach S (P[1] == S[0]), (b) is the
// predecessor selected by d[S] (P[0] == d[S]); its decoded bit is the input
// that drove P, P[1].  The result is due one clock after the inputs.
//
// The recursion follows the original design.  The property-style checks
// are this testbench's own.
module tb_traceback_unit;
  import vit_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  state_t state_in, state_out;
  dec_t dec;
  logic bit_out;
  int checks = 0, failures = 0;

  traceback_unit dut (.clk, .rst, .state_in, .dec, .state_out, .bit_out);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input bit that takes state p to state s, or -1 if no branch exists
  function automatic int transition_input(input state_t p, input state_t s);
    for (int u = 0; u < 2; u++)
      if ({logic'(u), p[1]} == s) return u;
    return -1;
  endfunction

  initial begin
    state_in = '0;
    dec = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 64 + 500; n++) begin
      state_t s;
      dec_t   dv;
      {s, dv} = (n < 64) ? 6'(n) : 6'($urandom_range(63));
      state_in = s;
      dec = dv;
      @(negedge clk);
      // the predecessor must lead into s with a valid branch
      checks += 3;
      if (transition_input(state_out, s) < 0) failures++;
      if (state_out[0] !== dv[s]) failures++;
      if (bit_out !== state_out[1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
