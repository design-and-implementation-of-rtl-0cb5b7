// tb_mod_inverse: checks gcd(a, m) and, where it is 1, that inv*a mod m = 1 and inv < m, for the
// key sizes of the engine (m up to 255) and some 16-bit moduli. Also checks that 'busy' is high
// from the cycle after start until done, and that the run takes no more than a + m + 2 cycles.
module tb_mod_inverse;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] a, m, gcd_o, inv_o;
  logic        busy, done;
  int checks = 0, failures = 0, coprime = 0, not_coprime = 0;

  mod_inverse #(.W(16)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a(a), .m(m),
    .busy(busy), .done(done), .gcd(gcd_o), .inv(inv_o)
  );

  always #5 clk = ~clk;

  task automatic run(input int av, input int mv);
    int cyc, g;
    @(negedge clk);
    a = 16'(av); m = 16'(mv); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy low after start"); end
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > av + mv + 4) break;
    end
    g = gcd(av, mv);
    checks++;
    if (!done || int'(gcd_o) != g) begin
      failures++;
      $display("FAIL a=%0d m=%0d gcd=%0d expected %0d (done=%0b)", av, mv, gcd_o, g, done);
    end
    if (g == 1) begin
      coprime++;
      checks++;
      if ((longint'(inv_o) * av) % mv != 1 || int'(inv_o) >= mv) begin
        failures++;
        $display("FAIL a=%0d m=%0d inv=%0d", av, mv, inv_o);
      end
    end else not_coprime++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(3, 40);     // d = 27
    run(5, 72);     // d = 29
    run(3, 72);     // gcd 3
    run(3, 8);      // d = 3
    for (int k = 0; k < 300; k++) begin
      automatic int mv = int'($urandom_range(2, 255));
      run(int'($urandom_range(1, mv - 1)), mv);
    end
    for (int k = 0; k < 20; k++) begin
      automatic int mv = int'($urandom_range(2, 65535));
      run(int'($urandom_range(1, mv - 1)), mv);
    end
    $display("coprime runs %0d, non-coprime runs %0d", coprime, not_coprime);
    checks++;
    if (coprime == 0 || not_coprime == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
