// full_adder: one-bit full adder with carry in, used in the ripple-carry
// 3-bit adders of the branch metric unit.  Purely combinational.
//
// It is the same cell as in the original design.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
