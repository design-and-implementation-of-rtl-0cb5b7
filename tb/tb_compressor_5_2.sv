// tb_compressor_5_2: exhaustive check of the approximate 5:2 compressor.
// For all 128 input patterns: cout1 equals cout2, and sum + 2*carry + 2*cout1 equals the number of
// ones among the seven inputs, less 2 exactly when both groups {a,b,c} and {d,e,cin1} hold two or
// more ones (the merged-carry case). Also counts how many patterns are exact.
module tb_compressor_5_2;
  logic [6:0] v;
  logic sum, carry, cout1, cout2;
  int checks = 0, failures = 0, exact = 0;
  int ones, g1, g2, expect_val, got;

  compressor_5_2 dut (
    .a(v[0]), .b(v[1]), .c(v[2]), .d(v[3]), .e(v[4]), .cin1(v[5]), .cin2(v[6]),
    .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2)
  );

  initial begin
    for (int i = 0; i < 128; i++) begin
      v = 7'(i);
      #1;
      ones = $countones(v);
      g1 = int'(v[0]) + int'(v[1]) + int'(v[2]);
      g2 = int'(v[3]) + int'(v[4]) + int'(v[5]);
      expect_val = ones - ((g1 >= 2 && g2 >= 2) ? 2 : 0);
      got = int'(sum) + 2 * int'(carry) + 2 * int'(cout1);
      checks += 3;
      if (got != expect_val) begin
        failures++;
        $display("FAIL in=%b value=%0d expected %0d", v, got, expect_val);
      end
      if (cout1 != cout2) begin
        failures++;
        $display("FAIL in=%b cout1=%0b cout2=%0b", v, cout1, cout2);
      end
      if (sum != v[0] ^ v[1] ^ v[2] ^ v[3] ^ v[4] ^ v[5] ^ v[6]) begin
        failures++;
        $display("FAIL in=%b sum=%0b is not the parity", v, sum);
      end
      if (got == ones) exact++;
    end
    $display("compressor: %0d of 128 input patterns exact", exact);
    checks++;
    if (exact != 128 - 32) begin
      failures++;
      $display("FAIL expected 96 exact patterns (4 * 4 * 2 inexact)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
