// compressor_5_2: approximate 5:2 compressor.
//
// Inputs are five bits of one column (a..e) and two carry-ins (cin1, cin2) from the column below;
// outputs are sum (weight 1), carry (weight 2) and two carry-outs cout1, cout2 (weight 2) for the
// column above. Three full adders do the work:
//   fa1 adds a, b, c            -> s1, c1
//   fa2 adds d, e, cin1         -> s2, c2
//   fa3 adds s1, s2, cin2       -> sum, carry
// An exact compressor would pass c1 and c2 on as two separate weight-2 carries. Here one OR gate
// merges them, cout1 = cout2 = c1 | c2, and the pair counts as a single weight-2 carry: the
// multiplier feeds cout1 to the next column's cin1 and leaves cout2 unused. The result is exact
// except when c1 and c2 are both 1, where the output is 2 below the true count. That merged pair
// and the three named full adders follow the schematic of the compressor; which adder takes which
// input, and the use of only cout1, are this design's reading of it. Purely combinational.
module compressor_5_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic s1, c1, s2, c2;

  full_adder fa1 (.a(a),  .b(b),  .cin(c),    .sum(s1),  .cout(c1));
  full_adder fa2 (.a(d),  .b(e),  .cin(cin1), .sum(s2),  .cout(c2));
  full_adder fa3 (.a(s1), .b(s2), .cin(cin2), .sum(sum), .cout(carry));

  // The approximation: both carry-outs are the OR of the two first-level carries.
  assign cout1 = c1 | c2;
  assign cout2 = c1 | c2;
endmodule
