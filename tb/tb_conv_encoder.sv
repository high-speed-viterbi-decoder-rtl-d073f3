// tb_conv_encoder: checks the convolutional encoder with the worked example
// (message 010111001010001 gives 00 11 10 00 01 10 01 11 11 10 00 10 11 00
// 11) and with a random message against the generator equations.
//
// The example and the generators are the original design's.  The
// phase-bit timing checked here is this design's.
module tb_conv_encoder;
  import tb_vit_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic in_take, sym_out, sym_is_g1;
  int checks = 0, failures = 0;

  conv_encoder dut (.clk, .rst, .din, .in_take, .sym_out, .sym_is_g1);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encode_hw(input bit bits[], output logic [1:0] code[]);
    int n_in = 0, n_out = 0;
    code = new[bits.size()];
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (n_out < 2 * bits.size()) begin
      din = (n_in < bits.size()) ? bits[n_in] : 1'b0;
      @(posedge clk);
      if (in_take) n_in++;
      @(negedge clk);
      if (n_out > 0 || sym_is_g1) begin
        checks++;
        if (sym_is_g1 != ((n_out % 2) == 0)) failures++;
        code[n_out / 2][1 - (n_out % 2)] = sym_out;
        n_out++;
      end
    end
  endtask

  initial begin
    string ex_in, ex_out;
    bit msg[];
    logic [1:0] hw[], ref_code[];
    ex_in  = "010111001010001";
    ex_out = "001110000110011111100010110011";
    msg = new[ex_in.len()];
    foreach (msg[i]) msg[i] = (ex_in[i] == "1");
    encode_hw(msg, hw);
    foreach (hw[i]) begin
      checks++;
      if (hw[i] !== {ex_out[2*i] == "1", ex_out[2*i+1] == "1"}) failures++;
    end
    msg = new[500];
    foreach (msg[i]) msg[i] = bit'($urandom_range(1));
    encode_hw(msg, hw);
    encode(msg, ref_code);
    foreach (hw[i]) begin
      checks++;
      if (hw[i] !== ref_code[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
