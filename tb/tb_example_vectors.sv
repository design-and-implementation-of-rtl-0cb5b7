// tb_example_vectors: runs the small example operands the engine was specified with.
// Key generation: (p, q) = (5, 11), (2, 3), (3, 5), (7, 13) must give n, phi, p-1, q-1 exactly.
// Exponentiation, as C = M^e mod n and M = C^d mod n:
//   encryption (m, e, n) = (10, 3, 55), (4, 1, 6), (5, 1, 15), (15, 5, 91)
//   decryption (c, d, n) = (30, 37, 39), (4, 1, 6), (11, 3, 15), (75, 29, 91)
// Each result must equal square-and-multiply over the multiplier model and is printed next to
// the exact power; both exponentiation units must finish in 8 cycles.
module tb_example_vectors;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        kg_start = 0, kg_busy, kg_done, kg_error;
  logic [7:0]  p, q;
  logic [15:0] n, phi, pm1, qm1, e, d;
  logic        x_start = 0, x_busy, x_done;
  logic [7:0]  x_base, x_exp, x_mod, x_res;
  int checks = 0, failures = 0, n_exact = 0;

  key_generation u_kg (
    .clk(clk), .rst_n(rst_n), .start(kg_start), .p(p), .q(q),
    .busy(kg_busy), .done(kg_done), .error(kg_error),
    .n(n), .phi(phi), .p_minus_1(pm1), .q_minus_1(qm1), .e(e), .d(d)
  );

  mod_exp u_exp (
    .clk(clk), .rst_n(rst_n), .start(x_start), .base(x_base), .exponent(x_exp),
    .modulus(x_mod), .busy(x_busy), .done(x_done), .result(x_res)
  );

  always #5 clk = ~clk;

  task automatic keygen(input int pv, input int qv);
    int cyc = 0;
    @(negedge clk);
    p = 8'(pv); q = 8'(qv); kg_start = 1;
    @(negedge clk);
    kg_start = 0;
    while (!kg_done && cyc < 100000) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(n) != pv * qv || int'(phi) != (pv - 1) * (qv - 1) ||
        int'(pm1) != pv - 1 || int'(qm1) != qv - 1) begin
      failures++;
      $display("FAIL keygen p=%0d q=%0d: n=%0d phi=%0d", pv, qv, n, phi);
    end
    $display("keygen p=%0d q=%0d: n=%0d phi=%0d p-1=%0d q-1=%0d e=%0d d=%0d error=%0b",
             pv, qv, n, phi, pm1, qm1, e, d, kg_error);
  endtask

  task automatic power(input string what, input int bv, input int ev, input int nv);
    int cyc = 1, model, exact;
    @(negedge clk);
    x_base = 8'(bv); x_exp = 8'(ev); x_mod = 8'(nv); x_start = 1;
    @(negedge clk);
    x_start = 0;
    while (!x_done && cyc < 100) begin @(negedge clk); cyc++; end
    model = approx_modexp(bv, ev, nv);
    exact = exact_modexp(bv, ev, nv);
    checks += 2;
    if (int'(x_res) != model) begin
      failures++;
      $display("FAIL %s %0d^%0d mod %0d = %0d, model %0d", what, bv, ev, nv, x_res, model);
    end
    if (cyc != 9) begin
      failures++;
      $display("FAIL %s latency %0d rising edges", what, cyc - 1);
    end
    if (int'(x_res) == exact) n_exact++;
    $display("%s %0d^%0d mod %0d = %0d (exact %0d)", what, bv, ev, nv, x_res, exact);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    keygen(5, 11);
    keygen(2, 3);
    keygen(3, 5);
    keygen(7, 13);
    power("encrypt", 10, 3, 55);
    power("encrypt", 4, 1, 6);
    power("encrypt", 5, 1, 15);
    power("encrypt", 15, 5, 91);
    power("decrypt", 30, 37, 39);
    power("decrypt", 4, 1, 6);
    power("decrypt", 11, 3, 15);
    power("decrypt", 75, 29, 91);
    $display("%0d of 8 exponentiations exact", n_exact);
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
