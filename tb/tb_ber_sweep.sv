// tb_ber_sweep: bit error rate of the full-size decoder (L = 6, M = 12)
// over an AWGN channel with 3-bit soft decisions, at Es/N0 = 1.0 to 5.0 dB
// in 0.5 dB steps.
//
// For each point a random message is encoded, mapped to +1/-1, given
// Gaussian noise, quantised with step 0.5 sigma and decoded.  It goes to both
// the main decoder and the two-unit decoder (L = 3 per unit).  Every output bit
// must equal an integer-metric reference decoder.  Each decoder's measured
// BER must lie below the BER of uncoded hard-decision transmission at the
// same Es/N0.  The main decoder's BER must fall from the first point to the
// last.
//
// The main decoder is also held against the published measurement of the
// original design.  At 1.0 .. 3.0 dB that curve reads about 1.2e-3, 4.5e-4,
// 1.8e-4, 5e-5 and 1.3e-5, read by eye from a log plot.  Every point with at
// least 30 errors must lie within a factor of 2 of it.  The coding gain at
// BER 1e-5 is estimated as well.  It is the Es/N0 an uncoded link needs for
// 1e-5 (9.6 dB) minus the Es/N0 where the decoder's curve crosses 1e-5,
// interpolated on a log scale.  The gain must be at least 5.7 dB, against
// 6.2 dB published.  Above 3 dB the error counts fall below 200, so those
// points are printed but not compared.
module tb_ber_sweep;
  import vit_pkg::*;
  import tb_vit_ref_pkg::*;

  localparam int L       = 6;
  localparam int M       = 2 * L;
  localparam int N       = 2 * M;
  localparam int LATENCY = 2 * N + 1 - L;
  localparam int ROWS    = 200000;
  localparam int NPTS    = 9;
  localparam int LD      = 3;
  localparam int MD      = 2 * LD;
  localparam int ND      = 2 * MD;
  localparam int LAT_D   = 2 * ND + 1 - LD;

  logic clk = 1'b0, rst = 1'b1;
  sym_pair_t x [M];
  logic [M-1:0] y;
  sym_pair_t dual_x [2 * MD];
  logic [2*MD-1:0] dual_y;
  logic enc_din = 1'b0, enc_in_take, enc_sym, enc_sym_is_g1;

  int checks = 0, failures = 0;
  real ber [NPTS];
  int  nerr [NPTS];
  // published BER at 1.0, 1.5, .. 3.0 dB (read from a plot, so approximate)
  real pub_ber [5] = '{1.2e-3, 4.5e-4, 1.8e-4, 5.0e-5, 1.3e-5};

  viterbi_top dut (.clk, .rst, .x, .y, .dual_x, .dual_y, .enc_clk(clk), .enc_rst(rst), .enc_din,
                   .enc_in_take, .enc_sym, .enc_sym_is_g1);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NPTS * (ROWS + LATENCY + 10) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gaussian tail probability Q(a), by Simpson integration of the density.
  function automatic real qfunc(input real a);
    real h, s, t;
    int n = 2000;
    h = (10.0 - a) / n;
    s = 0.0;
    for (int i = 0; i <= n; i++) begin
      t = a + i * h;
      s += ((i == 0 || i == n) ? 1.0 : ((i % 2 != 0) ? 4.0 : 2.0)) * $exp(-t * t / 2.0);
    end
    return s * h / 3.0 / $sqrt(6.283185307179586);
  endfunction

  task automatic run_point(input real es_n0_db, output real ber_out, output int err_out);
    bit msg[];
    logic [1:0] code[];
    logic [5:0] rx[];
    int errors = 0, total = 0, mism = 0;
    int d_errors = 0, d_total = 0;
    real uncoded, d_ber;
    msg = new[ROWS * M];
    foreach (msg[i]) msg[i] = bit'($urandom_range(1));
    encode(msg, code);
    rx = new[code.size()];
    foreach (code[i]) rx[i] = {channel(code[i][1], es_n0_db), channel(code[i][0], es_n0_db)};
    rst = 1'b1;
    foreach (x[j]) x[j] = '0;
    foreach (dual_x[j]) dual_x[j] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < ROWS + LATENCY; c++) begin
      @(negedge clk);
      if (c - LATENCY >= 0 && c - LATENCY + 1 < ROWS) begin
        automatic int r = c - LATENCY;
        logic [5:0] blk[];
        bit exp_bits[];
        int ss, mx;
        blk = new[N];
        for (int s = 0; s < N; s++) blk[s] = rx[r * M + s];
        ref_block(blk, L, exp_bits, ss, mx);
        for (int i = 0; i < M; i++) begin
          checks++;
          if (y[i] !== exp_bits[i]) begin failures++; mism++; end
          if (y[i] != msg[r * M + L + i]) errors++;
          total++;
        end
      end
      if (c - LAT_D >= 0 && c - LAT_D + 1 < ROWS) begin
        automatic int r = c - LAT_D;
        for (int u = 0; u < 2; u++) begin
          logic [5:0] blk[];
          bit exp_bits[];
          int ss, mx;
          int first = r * M + u * MD;
          blk = new[ND];
          for (int s = 0; s < ND; s++) blk[s] = rx[first + s];
          ref_block(blk, LD, exp_bits, ss, mx);
          for (int i = 0; i < MD; i++) begin
            checks++;
            if (dual_y[u * MD + i] !== exp_bits[i]) begin failures++; mism++; end
            if (dual_y[u * MD + i] != msg[first + LD + i]) d_errors++;
            d_total++;
          end
        end
      end
      for (int j = 0; j < M; j++) begin
        x[j]      = (c < ROWS) ? sym_pair_t'(rx[c * M + j]) : '0;
        dual_x[j] = x[j];
      end
    end
    ber_out = real'(errors) / real'(total);
    err_out = errors;
    d_ber   = real'(d_errors) / real'(d_total);
    uncoded = qfunc($sqrt(2.0 * 10.0 ** (es_n0_db / 10.0)));
    $display("Es/N0 %0.1f dB: %0d errors in %0d bits, BER %0.2e (uncoded %0.2e); two-unit: %0d errors in %0d bits, BER %0.2e; %0d reference mismatches",
             es_n0_db, errors, total, ber_out, uncoded, d_errors, d_total, d_ber, mism);
    checks += 2;
    if (ber_out >= uncoded) failures++;
    if (d_ber >= uncoded) failures++;
  endtask

  initial begin
    real lo, hi, mid, uncoded_db, coded_db, gain;
    for (int p = 0; p < NPTS; p++) run_point(1.0 + 0.5 * p, ber[p], nerr[p]);
    checks++;
    if (!(ber[NPTS-1] < ber[0])) failures++;

    // against the published curve
    foreach (pub_ber[p]) begin
      if (nerr[p] >= 30) begin
        checks++;
        if (ber[p] > 2.0 * pub_ber[p] || ber[p] < 0.5 * pub_ber[p]) begin
          failures++;
          $display("FAIL: BER %0.2e at %0.1f dB is not within 2x of %0.2e",
                   ber[p], 1.0 + 0.5 * p, pub_ber[p]);
        end
      end
    end

    // coding gain at 1e-5: uncoded Es/N0 by bisection, coded by log interpolation
    lo = 0.0;
    hi = 15.0;
    repeat (60) begin
      mid = (lo + hi) / 2.0;
      if (qfunc($sqrt(2.0 * 10.0 ** (mid / 10.0))) > 1.0e-5) lo = mid; else hi = mid;
    end
    uncoded_db = lo;
    coded_db = -1.0;
    for (int p = 0; p + 1 < NPTS; p++)
      if (coded_db < 0.0 && ber[p] >= 1.0e-5 && ber[p+1] < 1.0e-5 && ber[p+1] > 0.0)
        coded_db = 1.0 + 0.5 * p
                 + 0.5 * ($ln(ber[p]) - $ln(1.0e-5)) / ($ln(ber[p]) - $ln(ber[p+1]));
    gain = uncoded_db - coded_db;
    $display("BER 1e-5: uncoded at Es/N0 %0.2f dB, decoder at %0.2f dB, coding gain %0.2f dB (published 6.2 dB)",
             uncoded_db, coded_db, gain);
    checks++;
    if (coded_db < 0.0 || gain < 5.7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
