// tb_bm_unit: checks the branch metric unit against the soft Hamming
// distance table (distance of y to 0 is y, to 1 is 7 - y) for all 64
// symbol pairs and a random stream, including the one-clock register delay.
//
// The distance table is the original design's.  The stimulus is this
// testbench's own.
module tb_bm_unit;
  import vit_pkg::*;
  import tb_vit_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  sym_pair_t sym;
  bm_set_t   bm;
  int checks = 0, failures = 0;

  bm_unit dut (.clk, .rst, .sym, .bm);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bm_dist(input sym_pair_t s, input logic h1, input logic h0);
    return soft_dist(s.g1, h1) + soft_dist(s.g0, h0);
  endfunction

  initial begin
    sym_pair_t prev;
    sym = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (bm !== '0) failures++;          // reset value
    rst = 1'b0;
    prev = '0;
    for (int n = 0; n < 64 + 200; n++) begin
      sym = (n < 64) ? sym_pair_t'(n) : sym_pair_t'($urandom_range(63));
      @(negedge clk);
      checks += 4;
      if (int'(bm.bm00) != bm_dist(sym, 0, 0)) failures++;
      if (int'(bm.bm01) != bm_dist(sym, 0, 1)) failures++;
      if (int'(bm.bm10) != bm_dist(sym, 1, 0)) failures++;
      if (int'(bm.bm11) != bm_dist(sym, 1, 1)) failures++;
      prev = sym;
    end
    // register check: a change of input is not seen before the next edge
    sym = ~prev;
    #1;
    checks++;
    if (int'(bm.bm00) != bm_dist(prev, 0, 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
