// mod_reduce: combinational remainder r = x mod n.
//
// Restoring division without the quotient: starting from the top, the modulus shifted left by i
// is subtracted whenever it fits, for i = X_W-1 down to 0. x is an X_W-bit product and n an N_W-bit
// modulus; the remainder fits in N_W bits. n = 0 has no remainder and gives 0. It reduces each
// product of the modular exponentiation modulo n; the divider structure is this design's choice.
// Purely combinational.
module mod_reduce #(
  parameter int unsigned X_W = 16,
  parameter int unsigned N_W = 8
) (
  input  logic [X_W-1:0] x,
  input  logic [N_W-1:0] n,
  output logic [N_W-1:0] r
);
  localparam int unsigned T_W = X_W + N_W;

  logic [T_W-1:0] rem;
  always_comb begin
    rem = T_W'(x);
    for (int i = X_W - 1; i >= 0; i--) begin
      if (rem >= (T_W'(n) << i)) rem = rem - (T_W'(n) << i);
    end
    r = (n == '0) ? '0 : rem[N_W-1:0];
  end
endmodule
