// tb_skew_buffer: checks that W x D skew buffers delay a random stream by
// exactly D clocks (D = 1, 5 and 33, the deepest decision buffer of the
// decoder) and clear on reset.
//
// The depths are those the original design uses.  The test is this
// testbench's own.
module tb_skew_buffer;
  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] din6, dout1, dout5;
  logic [3:0] din4, dout33;
  int checks = 0, failures = 0;

  skew_buffer #(.W(6), .D(1))  dut1  (.clk, .rst, .din(din6), .dout(dout1));
  skew_buffer #(.W(6), .D(5))  dut5  (.clk, .rst, .din(din6), .dout(dout5));
  skew_buffer #(.W(4), .D(33)) dut33 (.clk, .rst, .din(din4), .dout(dout33));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] h6 [$];
  logic [3:0] h4 [$];

  initial begin
    din6 = '0; din4 = '0;
    repeat (2) @(negedge clk);
    checks += 3;
    if (dout1 !== '0 || dout5 !== '0 || dout33 !== '0) failures++;
    rst = 1'b0;
    for (int c = 0; c < 400; c++) begin
      din6 = 6'($urandom);
      din4 = 4'($urandom);
      h6.push_front(din6);
      h4.push_front(din4);
      @(negedge clk);
      if (c >= 0)  begin checks++; if (dout1 !== h6[0]) failures++; end
      if (c >= 4)  begin checks++; if (dout5 !== h6[4]) failures++; end
      if (c >= 32) begin checks++; if (dout33 !== h4[32]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
