// tb_acs2: checks the two-way ACS unit against integer arithmetic.  Path
// metrics are drawn as an unbounded integer base plus offsets below 40 and
// given to the unit modulo 128, so the test covers wrap-around; the result
// must be the smaller sum modulo 128, with the decision telling which one.
//
// The expected behaviour follows the original ACS.  The tie rule checked
// is this design's.  It prints TB_RESULT and stops; a watchdog ends a hung run.
module tb_acs2;
  import vit_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  pm_t pm0, pm1, pm;
  bm_t bm0, bm1;
  logic d;
  int checks = 0, failures = 0, n_wrap = 0, n_tie = 0, n_d1 = 0;

  acs2 dut (.clk, .rst, .pm0, .bm0, .pm1, .bm1, .pm, .d);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, a, b, s0, s1, want;
    bit want_d;
    pm0 = '0; pm1 = '0; bm0 = '0; bm1 = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      base = $urandom_range(1000);
      a    = base + $urandom_range(39);
      b    = base + $urandom_range(39);
      pm0  = pm_t'(a);
      pm1  = pm_t'(b);
      bm0  = bm_t'($urandom_range(14));
      bm1  = bm_t'($urandom_range(14));
      if (n % 7 == 0) begin pm1 = pm0; bm1 = bm0; b = a; end   // tie
      s0 = a + int'(bm0);
      s1 = b + int'(bm1);
      want_d = s1 < s0;
      want   = want_d ? s1 : s0;
      if ((s0 / 128) != (s1 / 128) || (want / 128) != (base / 128)) n_wrap++;
      if (s0 == s1) n_tie++;
      if (want_d) n_d1++;
      @(negedge clk);
      checks += 2;
      if (d !== want_d) failures++;
      if (pm !== pm_t'(want)) failures++;
    end
    checks += 3;
    if (n_wrap == 0) failures++;
    if (n_tie == 0) failures++;
    if (n_d1 == 0) failures++;
    $display("wrap cases %0d, ties %0d, d=1 %0d", n_wrap, n_tie, n_d1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
