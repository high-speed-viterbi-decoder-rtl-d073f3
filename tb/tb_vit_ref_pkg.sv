// tb_vit_ref_pkg: reference models for the decoder testbenches.
//
// - encode(): the rate 1/2, K = 3 encoder (g1 = 111, g0 = 101) from state 00.
// - soft_dist(): soft Hamming distance of a 3-bit value to a 0 or a 1.
// - ref_block(): decodes one block of 4L symbol pairs with plain integer
//   path metrics (no wrap-around) and a direct trellis search, returning the
//   M = 2L bits L .. 3L-1 of the block, the start state of the trace-back
//   and the largest final path metric.
// - channel(): antipodal mapping (0 -> +1, 1 -> -1), additive Gaussian noise
//   for a given Es/N0 and a uniform 3-bit quantizer with step D = 0.5 sigma.
//
// The channel model (random message, antipodal mapping, Gaussian noise,
// 3-bit uniform quantiser) follows the original design's verification
// setup.  The reference decoder is this design's own check: a
// straightforward integer-metric Viterbi decoder over one block.
package tb_vit_ref_pkg;


  // Encoder output pair {g1, g0} for input u from state {s1, s0}.
  function automatic logic [1:0] enc_out(input logic u, input logic [1:0] st);
    return {u ^ st[1] ^ st[0], u ^ st[0]};
  endfunction

  function automatic void encode(input bit msg[], output logic [1:0] code[]);
    logic [1:0] st = 2'b00;
    code = new[msg.size()];
    foreach (msg[i]) begin
      code[i] = enc_out(msg[i], st);
      st = {msg[i], st[1]};
    end
  endfunction

  function automatic int soft_dist(input logic [2:0] y, input logic b);
    return b ? 7 - int'(y) : int'(y);
  endfunction

  // sym[s] = {g1 soft, g0 soft} for stage s; result bits[i] = u(L+i).
  function automatic void ref_block(input logic [5:0] sym[], input int L,
                                    output bit bits[], output int start_state,
                                    output int max_metric);
    int n = 4 * L;
    int pm[4], npm[4];
    bit dec[][4];
    int st[];
    dec = new[n];
    st  = new[n+1];
    pm  = '{0, 0, 0, 0};
    for (int s = 0; s < n; s++) begin
      for (int j = 0; j < 4; j++) begin
        int cand[2];
        for (int b = 0; b < 2; b++) begin
          logic [1:0] i  = {logic'(j & 1), logic'(b)};
          logic [1:0] go = enc_out(logic'(j >> 1), i);
          cand[b] = pm[i] + soft_dist(sym[s][5:3], go[1]) + soft_dist(sym[s][2:0], go[0]);
        end
        dec[s][j] = cand[1] < cand[0];
        npm[j]    = dec[s][j] ? cand[1] : cand[0];
      end
      pm = npm;
    end
    start_state = 0;
    max_metric  = pm[0];
    for (int j = 1; j < 4; j++) begin
      if (pm[j] < pm[start_state]) start_state = j;
      if (pm[j] > max_metric) max_metric = pm[j];
    end
    st[n] = start_state;
    for (int s = n - 1; s >= 0; s--) st[s] = ((st[s+1] & 1) << 1) | int'(dec[s][st[s+1]]);
    bits = new[2 * L];
    for (int i = 0; i < 2 * L; i++) bits[i] = bit'(st[L + i + 1] >> 1);
  endfunction

  // Standard normal sample by the Box-Muller method.
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Transmit one code bit through the AWGN channel and quantise it.
  function automatic logic [2:0] channel(input logic c, input real es_n0_db);
    real es_n0, sigma, d, r;
    int q;
    es_n0 = 10.0 ** (es_n0_db / 10.0);
    sigma = $sqrt(1.0 / (2.0 * es_n0));
    d     = 0.5 * sigma;
    r     = (c ? -1.0 : 1.0) + sigma * gauss();
    q     = int'($floor(-r / d)) + 4;
    if (q < 0) q = 0;
    if (q > 7) q = 7;
    return 3'(q);
  endfunction

endpackage
