// tb_sbvd_dual_decoder: self-checking test of the two-unit decoder at its
// default size, two units with L = 3, M = 6, together 12 bits per clock.
//
// A random message is encoded and sent through a noisy channel, one run per
// Es/N0 point.  It is fed to the decoder one row of 2M symbol pairs per
// clock.  Each output word is compared with an integer-metric reference
// decoder, exactly 2N + 1 - L clocks after its first row.  The reference
// decodes two blocks per word: row t for y[0..M-1], and the block
// starting M pairs later for y[M..2M-1].  In the noiseless run the decoded
// bits must also equal the message.  A last run feeds a lost signal (soft
// values 3 and 4 only).  With L = 3 the path metrics cannot wrap: no step
// costs the best path more than 7, so after 12 stages every metric is below
// 7 x 12 + 28 = 112.  The test still reports the largest final metric it saw.
//
// The block assignment checked here follows the original design's
// two-unit decoder.  The latency and the output order are this design's
// reading of it.
module tb_sbvd_dual_decoder;
  import vit_pkg::*;
  import tb_vit_ref_pkg::*;

  localparam int L       = 3;
  localparam int M       = 2 * L;
  localparam int R       = 2 * M;         // pairs per row
  localparam int N       = 2 * M;
  localparam int LATENCY = 2 * N + 1 - L;
  localparam int ROWS    = 300;

  logic clk = 1'b0, rst = 1'b1;
  sym_pair_t x [R];
  logic [R-1:0] y;

  int checks = 0, failures = 0;
  int max_seen = 0;

  sbvd_dual_decoder dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real es_n0_db, input int mode);
    // mode 0: noiseless, 1: AWGN, 2: signal lost (values 3 and 4 only)
    bit         msg[];
    logic [1:0] code[];
    logic [5:0] rx[];
    int         msg_err = 0;
    msg = new[ROWS * R];
    foreach (msg[i]) msg[i] = bit'($urandom_range(1));
    encode(msg, code);
    rx = new[code.size()];
    foreach (code[i])
      case (mode)
        0:       rx[i] = {code[i][1] ? 3'd7 : 3'd0, code[i][0] ? 3'd7 : 3'd0};
        1:       rx[i] = {channel(code[i][1], es_n0_db), channel(code[i][0], es_n0_db)};
        default: rx[i] = {3'($urandom_range(4, 3)), 3'($urandom_range(4, 3))};
      endcase
    rst = 1'b1;
    foreach (x[j]) x[j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < ROWS + LATENCY; c++) begin
      @(negedge clk);
      if (c - LATENCY >= 0 && c - LATENCY + 1 < ROWS) begin
        int r = c - LATENCY;
        for (int u = 0; u < 2; u++) begin
          logic [5:0] blk[];
          bit exp_bits[];
          int ss, mx;
          int first = r * R + u * M;     // unit A: row r, unit B: M pairs later
          blk = new[N];
          for (int s = 0; s < N; s++) blk[s] = rx[first + s];
          ref_block(blk, L, exp_bits, ss, mx);
          if (mx > max_seen) max_seen = mx;
          for (int i = 0; i < M; i++) begin
            checks++;
            if (y[u * M + i] !== exp_bits[i]) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH mode %0d unit %0d word %0d bit %0d: got %0b want %0b",
                         mode, u, r, i, y[u * M + i], exp_bits[i]);
            end
            if (y[u * M + i] != msg[first + L + i]) msg_err++;
          end
        end
      end
      for (int j = 0; j < R; j++)
        x[j] = (c < ROWS) ? sym_pair_t'(rx[c * R + j]) : '0;
    end
    $display("mode %0d Es/N0 %0.1f dB: %0d bit errors against the message",
             mode, es_n0_db, msg_err);
    if (mode == 0) begin
      checks++;
      if (msg_err != 0) failures++;
    end
  endtask

  initial begin
    run(0.0, 0);
    run(1.0, 1);
    run(3.0, 1);
    run(0.0, 2);
    $display("largest final path metric: %0d", max_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
