// tb_sbvd_decoder: self-checking test of the sliding block decoder in its
// small configuration L = 3, M = 6 (a 12-stage, 6-bit decoder unit).
//
// A random message is encoded, sent through a noisy channel (one run per
// Es/N0 point) and fed to the decoder one row of M symbol pairs per clock.
// Every output word is compared, at exactly 2N + 1 - L clocks after its
// first row, with an integer-metric reference decoder; at the highest Es/N0
// the decoded bits must also equal the message.
//
// The Es/N0 points and the channel model follow the original design's
// verification setup.  The small size, the exact-latency check and the
// reference decoder are this testbench's own.
module tb_sbvd_decoder;
  import vit_pkg::*;
  import tb_vit_ref_pkg::*;

  localparam int L       = 3;
  localparam int M       = 2 * L;
  localparam int N       = 2 * M;
  localparam int LATENCY = 2 * N + 1 - L;
  localparam int ROWS    = 300;

  logic clk = 1'b0, rst = 1'b1;
  sym_pair_t x [M];
  logic [M-1:0] y;

  int checks = 0, failures = 0;

  sbvd_decoder #(.L(L)) dut (.clk, .rst, .x, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real es_n0_db, input bit noiseless);
    bit         msg[];
    logic [1:0] code[];
    logic [5:0] rx[];
    int         msg_err = 0;
    msg = new[ROWS * M];
    foreach (msg[i]) msg[i] = bit'($urandom_range(1));
    encode(msg, code);
    rx = new[code.size()];
    foreach (code[i])
      rx[i] = noiseless ? {code[i][1] ? 3'd7 : 3'd0, code[i][0] ? 3'd7 : 3'd0}
                        : {channel(code[i][1], es_n0_db), channel(code[i][0], es_n0_db)};
    rst = 1'b1;
    foreach (x[j]) x[j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < ROWS + LATENCY; c++) begin
      @(negedge clk);
      // output word of block r = c - LATENCY (rows r and r+1)
      if (c - LATENCY >= 0 && c - LATENCY + 1 < ROWS) begin
        int r = c - LATENCY;
        logic [5:0] blk[];
        bit exp_bits[];
        int ss, mx;
        blk = new[N];
        for (int s = 0; s < N; s++) blk[s] = rx[r * M + s];
        ref_block(blk, L, exp_bits, ss, mx);
        for (int i = 0; i < M; i++) begin
          checks++;
          if (y[i] !== exp_bits[i]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH Es/N0=%0.1f block %0d bit %0d: got %0b want %0b",
                       es_n0_db, r, i, y[i], exp_bits[i]);
          end
          if (y[i] != msg[r * M + L + i]) msg_err++;
        end
      end
      for (int j = 0; j < M; j++)
        x[j] = (c < ROWS) ? sym_pair_t'(rx[c * M + j]) : '0;
    end
    $display("Es/N0 %0.1f dB: %0d bit errors against the message", es_n0_db, msg_err);
    if (noiseless) begin
      checks++;
      if (msg_err != 0) failures++;
    end
  endtask

  initial begin
    run(0.0, 1'b1);
    run(1.0, 1'b0);
    run(4.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
