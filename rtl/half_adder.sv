// half_adder: one-bit half adder, sum = a ^ b, carry = a & b. Purely combinational.
// It is the least significant cell of the inexact multiplier's final carry-propagate adder, where
// no carry comes in.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
