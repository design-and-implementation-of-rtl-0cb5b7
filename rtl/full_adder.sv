// full_adder: one-bit full adder, sum = a ^ b ^ cin and cout = majority(a, b, cin).
// Purely combinational. It is the cell from which the 5:2 compressor (three of them) and the
// multiplier's ripple adder are built; the gate-level form (XOR for the sum, AND/OR for the
// carry) is the usual one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
