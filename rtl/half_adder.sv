// half_adder: one-bit half adder (sum = a ^ b, carry = a & b).
// The branch metric unit builds its 3-bit adders from these cells rather
// than from a '+' operator, so that the symbol inverters in front of the
// adders can merge with the adder logic into look-up tables.  Purely
// combinational.
//
// Using cells here, for the reason above, follows the original design.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);
  assign s    = a ^ b;
  assign cout = a & b;
endmodule
