// tb_sbvd_unit: self-checking test of the decoding core on its own, at its
// default size L = 6 (24 stages, 12 bits per block).
//
// Here the blocks do not overlap: every clock a fresh, unrelated block
// starts.  Half of the blocks are noisy code words, and half are random
// soft values that follow no code path.  The testbench applies the input
// skew itself: at clock c, stage s gets symbol s of block c - s.  The
// output at clock c + 2N + 1 - L must equal an integer-metric reference
// decoder run on block c.  A core whose result leaked from one block into
// the next would fail this, because the test has no overlap to hide it.
module tb_sbvd_unit;
  import vit_pkg::*;
  import tb_vit_ref_pkg::*;

  localparam int L       = 6;
  localparam int M       = 2 * L;
  localparam int N       = 2 * M;
  localparam int LATENCY = 2 * N + 1 - L;
  localparam int BLOCKS  = 1500;

  logic clk = 1'b0, rst = 1'b1;
  sym_pair_t xs [N];
  logic [M-1:0] y;

  int checks = 0, failures = 0;
  logic [5:0] blk [BLOCKS][N];

  sbvd_unit dut (.clk, .rst, .xs, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (BLOCKS + LATENCY + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the blocks
    for (int b = 0; b < BLOCKS; b++) begin
      if (b % 2 == 0) begin
        bit         msg[];
        logic [1:0] code[];
        msg = new[N];
        foreach (msg[i]) msg[i] = bit'($urandom_range(1));
        encode(msg, code);
        for (int s = 0; s < N; s++)
          blk[b][s] = {channel(code[s][1], 1.5), channel(code[s][0], 1.5)};
      end else begin
        for (int s = 0; s < N; s++) blk[b][s] = 6'($urandom);
      end
    end
    foreach (xs[s]) xs[s] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < BLOCKS + LATENCY; c++) begin
      @(negedge clk);
      if (c - LATENCY >= 0) begin
        automatic int b = c - LATENCY;
        logic [5:0] one[];
        bit exp_bits[];
        int ss, mx;
        one = new[N];
        for (int s = 0; s < N; s++) one[s] = blk[b][s];
        ref_block(one, L, exp_bits, ss, mx);
        for (int i = 0; i < M; i++) begin
          checks++;
          if (y[i] !== exp_bits[i]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH block %0d bit %0d: got %0b want %0b",
                       b, i, y[i], exp_bits[i]);
          end
        end
      end
      for (int s = 0; s < N; s++)
        xs[s] = (c - s >= 0 && c - s < BLOCKS) ? sym_pair_t'(blk[c - s][s]) : '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
