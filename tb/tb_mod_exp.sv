// tb_mod_exp: checks the modular exponentiation unit.
// Random (base, exponent, modulus) triples are compared with the model in tb_ref_pkg, which does
// the same square-and-multiply with an arithmetic model of the inexact multiplier. done must come
// 8 rising edges after the one that takes start. For the modulus 55 = 5*11 with e = 3, d = 27
// every message is encrypted and decrypted; how many round trips are exact is reported. Two
// example keys are also run: 10^3 mod 55 must be exact (10), 15^5 mod 91 is printed.
module tb_mod_exp;
  import tb_ref_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [7:0] base, exponent, modulus, result;
  logic       busy, done;
  int checks = 0, failures = 0, exact_trips = 0, trips = 0, approx_diff = 0;

  mod_exp dut (
    .clk(clk), .rst_n(rst_n), .start(start), .base(base), .exponent(exponent),
    .modulus(modulus), .busy(busy), .done(done), .result(result)
  );

  always #5 clk = ~clk;

  task automatic run(input int bv, input int ev, input int nv, output int res);
    int cyc;
    @(negedge clk);
    base = 8'(bv); exponent = 8'(ev); modulus = 8'(nv); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 50) begin
      @(negedge clk);
      cyc++;
    end
    // cyc counts falling edges after the rising edge that took start: done must be seen after the
    // 8th rising edge that follows it.
    checks++;
    if (cyc != 9) begin
      failures++;
      $display("FAIL done after %0d rising edges, expected 8", cyc - 1);
    end
    res = int'(result);
  endtask

  task automatic check(input int bv, input int ev, input int nv);
    int res, expect_r;
    run(bv, ev, nv, res);
    expect_r = approx_modexp(bv, ev, nv);
    checks++;
    if (res != expect_r) begin
      failures++;
      $display("FAIL %0d^%0d mod %0d -> %0d, model %0d", bv, ev, nv, res, expect_r);
    end
    if (expect_r != exact_modexp(bv, ev, nv)) approx_diff++;
  endtask

  initial begin
    int c, m2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Example keys (p, q) = (5, 11) and (7, 13).
    run(10, 3, 55, c);
    checks++; if (c != 10) begin failures++; $display("FAIL 10^3 mod 55 = %0d", c); end
    run(15, 5, 91, c);
    $display("15^5 mod 91 -> %0d (exact 71)", c);
    check(0, 0, 7);
    check(5, 0, 7);
    check(9, 4, 1);
    for (int k = 0; k < 400; k++)
      check(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)), int'($urandom_range(1, 255)));
    // Round trips with n = 55, e = 3, d = 27.
    for (int m = 0; m < 55; m++) begin
      run(m, 3, 55, c);
      run(c, 27, 55, m2);
      trips++;
      checks++;
      if (c != approx_modexp(m, 3, 55) || m2 != approx_modexp(c, 27, 55)) begin
        failures++;
        $display("FAIL round trip m=%0d c=%0d m'=%0d", m, c, m2);
      end
      if (m2 == m) exact_trips++;
    end
    $display("n=55: %0d of %0d messages round-trip exactly; %0d random runs differ from exact",
             exact_trips, trips, approx_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
