// tb_rsa_top: end-to-end test of the RSA engine at its default sizes.
// For every pair of primes p < q whose product fits in 8 bits, and for several messages each, one
// operation runs key generation, encryption and decryption. Keys are checked against the
// multiplier model and a gcd search, cipher and plain against square-and-multiply over the
// multiplier model. Then the error paths: a product wider than 8 bits (17, 19), a key without a
// usable e (2, 3) and a message not below n. Each mechanism is counted and must occur: a rejected e
// candidate, a key error, a message error, an exact round trip and a round trip the inexact
// multiplier changes. The time from start to done must be the key generator's time plus 22 cycles
// (the loop below counts falling edges, hence 23).
module tb_rsa_top;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [7:0]  p, q, msg, cipher, plain;
  logic        busy, done, key_error, msg_error;
  logic [15:0] n, phi, pm1, qm1, e, d;
  int checks = 0, failures = 0;
  int n_cipher_exact = 0, n_ops = 0, n_retry = 0, n_key_err = 0, n_msg_err = 0, n_exact = 0, n_dev = 0;
  int cyc, kg_cycles;
  bit kg_seen;

  rsa_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .p(p), .q(q), .msg(msg),
    .busy(busy), .done(done), .key_error(key_error), .msg_error(msg_error),
    .n(n), .phi(phi), .p_minus_1(pm1), .q_minus_1(qm1), .e(e), .d(d),
    .cipher(cipher), .plain(plain)
  );

  always #5 clk = ~clk;

  // Time of the key generator alone: from its start to its done.
  always @(posedge clk) begin
    if (dut.u_keygen.start) kg_cycles <= 0;
    else if (dut.u_keygen.busy) kg_cycles <= kg_cycles + 1;
  end

  task automatic run(input int pv, input int qv, input int mv);
    @(negedge clk);
    p = 8'(pv); q = 8'(qv); msg = 8'(mv); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 2000000) begin
      @(negedge clk);
      cyc++;
    end
    n_ops++;
    checks++;
    if (!done) begin failures++; $display("FAIL p=%0d q=%0d never done", pv, qv); end
  endtask

  initial begin
    int primes[$] = '{2, 3, 5, 7, 11, 13, 17, 19, 23, 29, 31, 37, 41, 43, 47, 53, 59, 61, 67, 71,
                      73, 79, 83, 89, 97, 101, 103, 107, 109, 113, 127};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (primes[i]) begin
      foreach (primes[j]) begin
        automatic int pv = primes[i], qv = primes[j];
        int nv, phiv, ev, cv, mv;
        if (pv >= qv || pv * qv > 255) continue;
        nv = approx_mul(pv, qv);
        phiv = approx_mul(pv - 1, qv - 1);
        ev = 3;
        while (ev < phiv && gcd(ev, phiv) != 1) ev += 2;
        for (int k = 0; k < 6; k++) begin
          mv = (k == 0) ? 2 : int'($urandom_range(0, nv - 1));
          run(pv, qv, mv);
          checks += 2;
          if (int'(n) != nv || int'(phi) != phiv || int'(pm1) != pv - 1 || int'(qm1) != qv - 1) begin
            failures++;
            $display("FAIL p=%0d q=%0d n=%0d phi=%0d", pv, qv, n, phi);
          end
          if (ev >= phiv || nv > 255) begin
            if (!key_error) begin failures++; $display("FAIL p=%0d q=%0d no key error", pv, qv); end
            continue;
          end
          if (key_error || msg_error || int'(e) != ev || (int'(d) * ev) % phiv != 1) begin
            failures++;
            $display("FAIL p=%0d q=%0d e=%0d d=%0d flags %0b%0b", pv, qv, e, d, key_error, msg_error);
            continue;
          end
          if (k == 0 && ev > 3) n_retry++;
          cv = approx_modexp(mv, ev, nv);
          checks += 3;
          if (int'(cipher) != cv) begin
            failures++;
            $display("FAIL p=%0d q=%0d m=%0d: cipher %0d, model %0d", pv, qv, mv, cipher, cv);
          end
          if (int'(plain) != approx_modexp(cv, int'(d), nv)) begin
            failures++;
            $display("FAIL p=%0d q=%0d m=%0d: plain %0d, model %0d", pv, qv, mv, plain,
                     approx_modexp(cv, int'(d), nv));
          end
          if (cyc != kg_cycles + 23) begin
            failures++;
            $display("FAIL p=%0d q=%0d: %0d cycles, key generation %0d", pv, qv, cyc, kg_cycles);
          end
          if (int'(cipher) == exact_modexp(mv, ev, nv)) n_cipher_exact++;
          if (int'(plain) == mv) n_exact++;
          else n_dev++;
        end
      end
    end
    // Error paths.
    run(17, 19, 5);
    checks++;
    if (!key_error || int'(n) != approx_mul(17, 19)) begin failures++; $display("FAIL 17*19 accepted"); end
    else n_key_err++;
    run(2, 3, 1);
    checks++;
    if (!key_error) begin failures++; $display("FAIL (2,3) accepted"); end
    else n_key_err++;
    run(5, 11, 60);
    checks++;
    if (!msg_error || key_error) begin failures++; $display("FAIL message 60 >= 55 accepted"); end
    else n_msg_err++;
    run(5, 11, 10);
    checks++;
    if (msg_error || key_error || int'(cipher) != approx_modexp(10, 3, 55)) begin
      failures++;
      $display("FAIL flags not cleared");
    end
    $display("ciphertexts equal to exact RSA: %0d of %0d", n_cipher_exact, n_exact + n_dev);
    $display("operations %0d: e rejected %0d, key errors %0d, message errors %0d, exact round trips %0d, changed round trips %0d",
             n_ops, n_retry, n_key_err, n_msg_err, n_exact, n_dev);
    checks += 5;
    if (n_retry == 0)   begin failures++; $display("FAIL no e candidate was rejected"); end
    if (n_key_err == 0) begin failures++; $display("FAIL no key error"); end
    if (n_msg_err == 0) begin failures++; $display("FAIL no message error"); end
    if (n_exact == 0)   begin failures++; $display("FAIL no exact round trip"); end
    if (n_dev == 0)     begin failures++; $display("FAIL inexact multiplier never changed a result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
