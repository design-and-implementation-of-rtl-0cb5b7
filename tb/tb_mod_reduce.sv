// tb_mod_reduce: checks x mod n for every 8-bit modulus against '%': 200 random 16-bit x per
// modulus plus the corner values 0, n-1, n, 65535. n = 0 must give 0.
module tb_mod_reduce;
  logic [15:0] x;
  logic [7:0]  n, r;
  int checks = 0, failures = 0;

  mod_reduce #(.X_W(16), .N_W(8)) dut (.x(x), .n(n), .r(r));

  task automatic check(input int xv, input int nv);
    int expect_r;
    x = 16'(xv); n = 8'(nv);
    #1;
    expect_r = (nv == 0) ? 0 : xv % nv;
    checks++;
    if (int'(r) != expect_r) begin
      failures++;
      if (failures < 10) $display("FAIL %0d mod %0d -> %0d, expected %0d", xv, nv, r, expect_r);
    end
  endtask

  initial begin
    for (int nv = 0; nv < 256; nv++) begin
      check(0, nv);
      check(65535, nv);
      if (nv > 0) begin
        check(nv - 1, nv);
        check(nv, nv);
      end
      for (int k = 0; k < 200; k++) check(int'($urandom_range(0, 65535)), nv);
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
