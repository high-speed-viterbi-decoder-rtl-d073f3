// add3: 3-bit ripple-carry adder with a 4-bit result, built from one half
// adder and two full adders.  Purely combinational.
//
// The original design builds its branch metric adders from the same
// cells.  The module boundary is this design's.
module add3 (
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [3:0] sum
);
  logic c0, c1;
  half_adder u_b0 (.a(a[0]), .b(b[0]), .s(sum[0]), .cout(c0));
  full_adder u_b1 (.a(a[1]), .b(b[1]), .cin(c0), .s(sum[1]), .cout(c1));
  full_adder u_b2 (.a(a[2]), .b(b[2]), .cin(c1), .s(sum[2]), .cout(sum[3]));
endmodule
