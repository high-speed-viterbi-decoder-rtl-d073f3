// tb_acs4: checks one trellis stage (branch metrics + four ACS units)
// against a direct trellis computation built from the encoder equations.
// A new symbol pair and a new set of path metrics are applied every clock;
// the stage output two clocks after a symbol must be the update of the
// metrics applied one clock after that symbol.
//
// The trellis follows the original design.  The stimulus and the
// reference model are this testbench's own.
module tb_acs4;
  import vit_pkg::*;
  import tb_vit_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  sym_pair_t sym;
  pm_t pm_in [NSTATE], pm_out [NSTATE];
  dec_t dec;
  int checks = 0, failures = 0;

  acs4 dut (.clk, .rst, .sym, .pm_in, .pm_out, .dec);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCYC = 2000;
  sym_pair_t syms [NCYC];
  int        pms  [NCYC][4];

  initial begin
    sym = '0;
    foreach (pm_in[i]) pm_in[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      automatic int base = $urandom_range(500);
      syms[c] = sym_pair_t'($urandom_range(63));
      for (int i = 0; i < 4; i++) pms[c][i] = base + $urandom_range(35);
      sym = syms[c];
      for (int i = 0; i < 4; i++) pm_in[i] = pm_t'(pms[c][i]);
      @(negedge clk);
      // after this clock edge pm_out holds the update of the metrics of
      // cycle c with the symbol of cycle c-1
      if (c >= 1) begin
        for (int j = 0; j < 4; j++) begin
          automatic int cand [2];
          automatic bit wd;
          for (int b = 0; b < 2; b++) begin
            automatic logic [1:0] i  = {logic'(j & 1), logic'(b)};
            automatic logic [1:0] go = enc_out(logic'(j >> 1), i);
            cand[b] = pms[c][i] + soft_dist(syms[c-1].g1, go[1]) + soft_dist(syms[c-1].g0, go[0]);
          end
          wd = cand[1] < cand[0];
          checks += 2;
          if (dec[j] !== wd) failures++;
          if (pm_out[j] !== pm_t'(wd ? cand[1] : cand[0])) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
