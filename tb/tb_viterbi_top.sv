// tb_viterbi_top: end-to-end test of the whole design at its default size
// (L = 6, M = 12, 24 trellis stages, 12 decoded bits per clock).
//
// 1. The encoder is given the 15-bit example message 010111001010001 and
//    must produce 00 11 10 00 01 10 01 11 11 10 00 10 11 00 11.
// 2. The encoder then codes a random message; its serial output is checked
//    against a reference encoder and becomes the decoder's channel stream.
// 3. The decoder gets that stream noiseless (decoded bits must equal the
//    message) and through a noisy 3-bit soft channel at 1 dB and 2 dB Es/N0, and with the
//    signal lost (soft values 3 and 4 only, every branch metric 6 to 8)
//    (decoded bits must equal an integer-metric reference decoder).  Each
//    output word is checked in the exact clock it is due, 43 clocks after
//    its first row, so latency and the 12-bit-per-clock rate are checked too.
// 4. The two-unit decoder gets the same rows in the same runs.  Its output
//    words are due 22 clocks after row t.  They hold message bits
//    12t + 3 .. 12t + 14, and each half is checked against the reference
//    decoder run on that half's 12-pair block.
//
// It also counts how often the design's mechanisms were exercised and fails
// if one never was: channel bit errors corrected, path metrics wrapping
// past 2^7 (the signal-lost run), and each of the four trace-back start states.
//
// The example, the channel and the 12-bit-per-clock rate follow the
// original design.  The 43-clock latency is derived from its register
// stages.  The mechanism counts, the signal-lost run and the two-unit checks
// are this testbench's own.
module tb_viterbi_top;
  import vit_pkg::*;
  import tb_vit_ref_pkg::*;

  localparam int L       = 6;
  localparam int M       = 2 * L;
  localparam int N       = 2 * M;
  localparam int LATENCY = 2 * N + 1 - L;   // 43
  localparam int ROWS    = 400;
  localparam int LD      = 3;                // two-unit decoder, per unit
  localparam int MD      = 2 * LD;
  localparam int ND      = 2 * MD;
  localparam int LAT_D   = 2 * ND + 1 - LD;  // 22

  logic clk = 1'b0, rst = 1'b1;
  sym_pair_t x [M];
  logic [M-1:0] y;
  sym_pair_t dual_x [2 * MD];
  logic [2*MD-1:0] dual_y;
  logic enc_clk = 1'b0, enc_rst = 1'b1, enc_din = 1'b0;
  logic enc_in_take, enc_sym, enc_sym_is_g1;

  int checks = 0, failures = 0;
  int n_corrected = 0, n_wrap = 0;
  int n_start [4] = '{0, 0, 0, 0};
  int n_dual_corrected = 0;

  viterbi_top dut (.clk, .rst, .x, .y, .dual_x, .dual_y, .enc_clk, .enc_rst, .enc_din, .enc_in_take,
                   .enc_sym, .enc_sym_is_g1);

  always #5 clk = ~clk;
  always #5 enc_clk = ~enc_clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  // Run `bits` through the hardware encoder; returns the serial symbols.
  task automatic hw_encode(input bit bits[], output logic [1:0] code[]);
    int n_in = 0, n_out = 0;
    code = new[bits.size()];
    enc_rst = 1'b1;
    repeat (2) @(negedge enc_clk);
    enc_rst = 1'b0;
    while (n_out < 2 * bits.size()) begin
      enc_din = (n_in < bits.size()) ? bits[n_in] : 1'b0;
      @(posedge enc_clk);
      if (enc_in_take) n_in++;
      @(negedge enc_clk);
      if (n_out > 0 || enc_sym_is_g1) begin
        check(enc_sym_is_g1 == ((n_out % 2) == 0), "encoder g1/g0 phase");
        code[n_out / 2][1 - (n_out % 2)] = enc_sym;
        n_out++;
      end
    end
  endtask

  task automatic run_decoder(input bit msg[], input logic [1:0] code[],
                             input real es_n0_db, input bit noiseless,
                             input bit lost = 1'b0);
    logic [5:0] rx[];
    int msg_err = 0, dual_err = 0;
    rx = new[code.size()];
    foreach (code[i])
      rx[i] = lost      ? {3'(3 + $urandom_range(1)), 3'(3 + $urandom_range(1))}
            : noiseless ? {code[i][1] ? 3'd7 : 3'd0, code[i][0] ? 3'd7 : 3'd0}
                        : {channel(code[i][1], es_n0_db), channel(code[i][0], es_n0_db)};
    rst = 1'b1;
    foreach (x[j]) x[j] = '0;
    foreach (dual_x[j]) dual_x[j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < ROWS + LATENCY; c++) begin
      @(negedge clk);
      if (c - LATENCY >= 0 && c - LATENCY + 1 < ROWS) begin
        int r = c - LATENCY;
        logic [5:0] blk[];
        bit exp_bits[];
        int ss, mx;
        blk = new[N];
        for (int s = 0; s < N; s++) blk[s] = rx[r * M + s];
        ref_block(blk, L, exp_bits, ss, mx);
        n_start[ss]++;
        if (mx >= 128) n_wrap++;
        for (int i = 0; i < M; i++) begin
          int pos = r * M + L + i;
          check(y[i] === exp_bits[i], $sformatf("Es/N0=%0.1f block %0d bit %0d", es_n0_db, r, i));
          if (y[i] != msg[pos]) msg_err++;
          // a hard-decision channel error on this bit's symbol pair that
          // the decoder still got right
          if (y[i] == msg[pos] && ((rx[pos][5] != code[pos][1]) || (rx[pos][2] != code[pos][0])))
            n_corrected++;
        end
      end
      if (c - LAT_D >= 0 && c - LAT_D + 1 < ROWS) begin
        int r = c - LAT_D;
        for (int u = 0; u < 2; u++) begin
          logic [5:0] blk[];
          bit exp_bits[];
          int ss, mx;
          int first = r * M + u * MD;
          blk = new[ND];
          for (int s = 0; s < ND; s++) blk[s] = rx[first + s];
          ref_block(blk, LD, exp_bits, ss, mx);
          for (int i = 0; i < MD; i++) begin
            int pos = first + LD + i;
            check(dual_y[u * MD + i] === exp_bits[i],
                  $sformatf("two-unit Es/N0=%0.1f word %0d unit %0d bit %0d", es_n0_db, r, u, i));
            if (dual_y[u * MD + i] != msg[pos]) dual_err++;
            if (dual_y[u * MD + i] == msg[pos] &&
                ((rx[pos][5] != code[pos][1]) || (rx[pos][2] != code[pos][0])))
              n_dual_corrected++;
          end
        end
      end
      for (int j = 0; j < M; j++) begin
        x[j]      = (c < ROWS) ? sym_pair_t'(rx[c * M + j]) : '0;
        dual_x[j] = x[j];
      end
    end
    $display("Es/N0 %0.1f dB%s: %0d decoded bit errors, two-unit decoder %0d", es_n0_db,
             lost ? " (signal lost)" : noiseless ? " (noiseless)" : "", msg_err, dual_err);
    if (noiseless) begin
      check(msg_err == 0, "noiseless decoding equals the message");
      check(dual_err == 0, "noiseless two-unit decoding equals the message");
    end
  endtask

  initial begin
    bit         ex_msg[];
    logic [1:0] ex_code[];
    bit         msg[];
    logic [1:0] code_hw[], code_ref[];
    string      ex_in, ex_out;

    // 1. worked example
    ex_in  = "010111001010001";
    ex_out = "001110000110011111100010110011";
    ex_msg = new[ex_in.len()];
    foreach (ex_msg[i]) ex_msg[i] = (ex_in[i] == "1");
    hw_encode(ex_msg, ex_code);
    foreach (ex_code[i])
      check(ex_code[i] == {ex_out[2*i] == "1", ex_out[2*i+1] == "1"},
            $sformatf("encoder example pair %0d", i));

    // 2. random message through the hardware encoder
    msg = new[ROWS * M];
    foreach (msg[i]) msg[i] = bit'($urandom_range(1));
    hw_encode(msg, code_hw);
    encode(msg, code_ref);
    foreach (code_ref[i]) check(code_hw[i] == code_ref[i], $sformatf("encoder pair %0d", i));

    // 3. decoder
    run_decoder(msg, code_hw, 0.0, 1'b1);
    run_decoder(msg, code_hw, 1.0, 1'b0);
    run_decoder(msg, code_hw, 2.0, 1'b0);
    run_decoder(msg, code_hw, 0.0, 1'b0, 1'b1);  // signal lost: metrics wrap

    $display("mechanisms: corrected channel errors=%0d, metric wrap blocks=%0d, start states 00/01/10/11=%0d/%0d/%0d/%0d",
             n_corrected, n_wrap, n_start[0], n_start[1], n_start[2], n_start[3]);
    $display("two-unit decoder: corrected channel errors=%0d", n_dual_corrected);
    check(n_corrected > 0, "no channel error was corrected");
    check(n_dual_corrected > 0, "two-unit decoder corrected no channel error");
    check(n_wrap > 0, "path metrics never wrapped");
    foreach (n_start[s]) check(n_start[s] > 0, $sformatf("start state %0d never used", s));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
