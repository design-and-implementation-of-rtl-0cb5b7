// tb_dadda_multiplier_8x8: exhaustive check of the inexact 8x8 multiplier.
// All 65536 operand pairs are compared with the arithmetic model in tb_ref_pkg; every product must
// also be no larger than a*b. The products of the small example keys (5*11, 4*10, 7*13, 6*12, 2*3,
// 1*2, 3*5, 2*4, 10*3, 15*5, 11*3, 4*1) must be exact.
// The run reports the share of exact products and the mean relative error.
module tb_dadda_multiplier_8x8;
  import tb_ref_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0, n_exact = 0;
  real rel_err = 0.0;
  int fig_a[12] = '{5, 4, 7, 6, 2, 1, 3, 2, 10, 15, 11, 4};
  int fig_b[12] = '{11, 10, 13, 12, 3, 2, 5, 4, 3, 5, 3, 1};

  dadda_multiplier_8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != approx_mul(i, j) || int'(p) > i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d -> %0d, model %0d", i, j, p, approx_mul(i, j));
        end
        if (int'(p) == i * j) n_exact++;
        else rel_err += real'(i * j - int'(p)) / real'(i * j);
      end
    end
    for (int k = 0; k < 12; k++) begin
      a = 8'(fig_a[k]); b = 8'(fig_b[k]);
      #1;
      checks++;
      if (int'(p) != fig_a[k] * fig_b[k]) begin
        failures++;
        $display("FAIL %0d*%0d -> %0d, expected exact", fig_a[k], fig_b[k], p);
      end
    end
    a = 30; b = 37; #1; $display("30*37 -> %0d (exact 1110)", p);
    a = 75; b = 29; #1; $display("75*29 -> %0d (exact 2175)", p);
    $display("exact products: %0d of 65536, mean relative error %f", n_exact, rel_err / 65536.0);
    checks++;
    if (n_exact == 65536) begin
      failures++;
      $display("FAIL the multiplier shows no approximation at all");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
