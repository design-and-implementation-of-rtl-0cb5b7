// dadda_multiplier_8x8: inexact 8x8 unsigned multiplier built from approximate 5:2 compressors.
//
// The 64 partial-product bits a[i] & b[j] form eight rows, row j shifted left by j; the tallest
// column holds eight bits. Two layers of compressor_5_2 reduce them to two rows, then a ripple
// carry-propagate adder (a half adder at bit 0, full adders above) adds those:
//   layer 1: in every column k, rows 0..4 go to inputs a..e; the compressors form one row whose
//            cout1 feeds the next column's cin1 (cin2 is 0). Out come a sum row S1 and a carry
//            row C1 (weight k+1), so the tallest column shrinks from 8 to 5 bits.
//   layer 2: S1, C1 and rows 5..7 (five bits per column at most) go through a second row of
//            compressors the same way, giving S2 and C2.
//   final:   product = S2 + C2 in a 16-bit ripple adder.
// A compressor loses 2 in its column when both of its first-level carries are set (see
// compressor_5_2), so the product is never above a*b and is exact for most small operands. The
// compressors are merged into a two-layer column-compression tree in place of the half and full
// adders of a classic Dadda reduction; that layout, the row-to-input assignment and the ripple
// adder are this design's choices, as the exact wiring of the tree is not specified. Purely
// combinational: the product is valid one propagation delay after the operands.
module dadda_multiplier_8x8
  import rsa_pkg::*;
(
  input  data_t a,
  input  data_t b,
  output prod_t p
);
  localparam int unsigned COLS = PROD_W;

  // Partial-product rows, already shifted into their columns.
  prod_t pp [DATA_W];
  always_comb begin
    for (int j = 0; j < DATA_W; j++) begin
      pp[j] = ({{DATA_W{1'b0}}, a} & {PROD_W{b[j]}}) << j;
    end
  end

  prod_t s1, s2;          // sum rows of the two layers
  logic [COLS:0] c1, c2;  // carry rows, bit k+1 holds the carry out of column k
  logic [COLS:0] k1, k2;  // cout1 -> cin1 chains, bit k is the carry into column k

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;
  assign k1[0] = 1'b0;
  assign k2[0] = 1'b0;

  for (genvar k = 0; k < COLS; k++) begin : g_col
    compressor_5_2 u_l1 (
      .a(pp[0][k]), .b(pp[1][k]), .c(pp[2][k]), .d(pp[3][k]), .e(pp[4][k]),
      .cin1(k1[k]), .cin2(1'b0),
      .sum(s1[k]), .carry(c1[k+1]), .cout1(k1[k+1]), .cout2()
    );
    compressor_5_2 u_l2 (
      .a(s1[k]), .b(c1[k]), .c(pp[5][k]), .d(pp[6][k]), .e(pp[7][k]),
      .cin1(k2[k]), .cin2(1'b0),
      .sum(s2[k]), .carry(c2[k+1]), .cout1(k2[k+1]), .cout2()
    );
  end

  // Final carry-propagate adder: S2 + C2 (C2 has no bit 0 input, so bit 0 is a half adder).
  logic [COLS:0] rc;
  half_adder u_ha (.a(s2[0]), .b(c2[0]), .sum(p[0]), .cout(rc[1]));
  for (genvar k = 1; k < COLS; k++) begin : g_cpa
    full_adder u_fa (.a(s2[k]), .b(c2[k]), .cin(rc[k]), .sum(p[k]), .cout(rc[k+1]));
  end
  assign rc[0] = 1'b0;
endmodule
