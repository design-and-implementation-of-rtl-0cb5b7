// tb_key_generation: checks the key generation unit.
// Four example prime pairs have known keys: (5, 11) -> n 55, phi 40, e 3, d 27; (3, 5) -> n 15,
// phi 8, e 3, d 3; (7, 13) -> n 91, phi 72, e 5 after e = 3 is rejected, d 29; (2, 3) -> n 6,
// phi 2 and no usable e, so error. p-1 and q-1 are checked for each. Random pairs p, q in 2..255 are
// compared with the multiplier model for n and phi and with a gcd search for e; d must satisfy
// d*e mod phi = 1. p = 1 must raise error. The number of rejected e candidates is counted.
module tb_key_generation;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [7:0]  p, q;
  logic        busy, done, error;
  logic [15:0] n, phi, pm1, qm1, e, d;
  int checks = 0, failures = 0, retries = 0, errors_seen = 0;

  key_generation dut (
    .clk(clk), .rst_n(rst_n), .start(start), .p(p), .q(q),
    .busy(busy), .done(done), .error(error),
    .n(n), .phi(phi), .p_minus_1(pm1), .q_minus_1(qm1), .e(e), .d(d)
  );

  always #5 clk = ~clk;

  task automatic run(input int pv, input int qv);
    int cyc = 0;
    @(negedge clk);
    p = 8'(pv); q = 8'(qv); start = 1;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 2000000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!done) begin failures++; $display("FAIL p=%0d q=%0d never done", pv, qv); end
    if (error) errors_seen++;
  endtask

  task automatic expect_key(input int pv, input int qv, input int nv, input int phiv,
                            input int ev, input int dv, input bit err);
    run(pv, qv);
    checks += 4;
    if (int'(n) != nv || int'(phi) != phiv || int'(pm1) != pv - 1 || int'(qm1) != qv - 1) begin
      failures++;
      $display("FAIL p=%0d q=%0d: n=%0d phi=%0d p-1=%0d q-1=%0d", pv, qv, n, phi, pm1, qm1);
    end
    if (error != err) begin
      failures++;
      $display("FAIL p=%0d q=%0d: error=%0b", pv, qv, error);
    end
    if (!err && (int'(e) != ev || int'(d) != dv)) begin
      failures++;
      $display("FAIL p=%0d q=%0d: e=%0d d=%0d, expected %0d %0d", pv, qv, e, d, ev, dv);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    expect_key(5, 11, 55, 40, 3, 27, 0);
    expect_key(3, 5, 15, 8, 3, 3, 0);
    expect_key(7, 13, 91, 72, 5, 29, 0);
    expect_key(2, 3, 6, 2, 0, 0, 1);
    run(1, 7);
    checks++;
    if (!error) begin failures++; $display("FAIL p=1 accepted"); end
    for (int k = 0; k < 60; k++) begin
      automatic int pv = int'($urandom_range(2, 255));
      automatic int qv = int'($urandom_range(2, 255));
      automatic int nv = approx_mul(pv, qv);
      automatic int phiv = approx_mul(pv - 1, qv - 1);
      automatic int ev = 3;
      while (ev < phiv && gcd(ev, phiv) != 1) ev += 2;
      retries += (ev - 3) / 2;
      run(pv, qv);
      checks += 3;
      if (int'(n) != nv || int'(phi) != phiv) begin
        failures++;
        $display("FAIL p=%0d q=%0d: n=%0d phi=%0d, model %0d %0d", pv, qv, n, phi, nv, phiv);
      end
      if (error != (ev >= phiv)) begin
        failures++;
        $display("FAIL p=%0d q=%0d: error=%0b", pv, qv, error);
      end
      if (!error && (int'(e) != ev || (longint'(d) * e) % phiv != 1)) begin
        failures++;
        $display("FAIL p=%0d q=%0d phi=%0d: e=%0d d=%0d", pv, qv, phiv, e, d);
      end
    end
    $display("rejected e candidates in random runs: %0d, error runs: %0d", retries, errors_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
