// tb_sse_unit: checks the survivor state estimator.  Four metrics within 42
// of each other (around a random, possibly wrapping base) are applied; one
// clock later the unit must name the smallest, the lowest index on a tie.
//
// The function follows the original design.  The tie rule checked is
// this design's.
module tb_sse_unit;
  import vit_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  pm_t pm [NSTATE];
  state_t best;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  sse_unit dut (.clk, .rst, .pm, .best);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [4];
    int want;
    foreach (pm[i]) pm[i] = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (best !== 2'd0) failures++;
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      automatic int base = $urandom_range(1000);
      for (int i = 0; i < 4; i++) v[i] = base + ((n % 5 == 0) ? $urandom_range(2) : $urandom_range(42));
      want = 0;
      for (int i = 1; i < 4; i++) if (v[i] < v[want]) want = i;
      seen[want]++;
      for (int i = 0; i < 4; i++) pm[i] = pm_t'(v[i]);
      @(negedge clk);
      checks++;
      if (best !== state_t'(want)) failures++;
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
