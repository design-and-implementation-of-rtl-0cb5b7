// key_generation: RSA key generation unit.
//
// From the primes p and q it forms p-1, q-1 and, with two inexact multipliers, n = p*q and
// phi = (p-1)*(q-1). It then searches the public exponent: e starts at E_FIRST and steps by 2
// until mod_inverse reports gcd(e, phi) = 1; that run's inverse is the private exponent d. When
// no odd e below phi is coprime to phi, or p or q is below 2, 'error' is raised instead. p and q
// are not tested for primality.
//
// Interface: a one-cycle 'start' while idle latches p and q; 'busy' stays high until 'done' pulses
// for one cycle; the outputs then hold until the next start. n, phi, p_minus_1 and q_minus_1 are
// valid from the second cycle after start. Timing: 2 cycles, then for every candidate e one
// mod_inverse run (at most about e + phi cycles) plus 2 cycles. Reset (rst_n, active low,
// synchronous) clears the outputs. The outputs and their widths (8-bit p and q, 16-bit n, phi,
// p_minus_1, q_minus_1), the use of the inexact multiplier for n and phi and the modular inverse
// for d follow the design description; the search rule for e and the handshake are this design's
// choices. The rule gives e = 3 for phi = 40 and e = 5 (d = 29) for phi = 72.
module key_generation
  import rsa_pkg::*;
#(
  parameter int unsigned E_FIRST = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t p,
  input  data_t q,
  output logic  busy,
  output logic  done,
  output logic  error,
  output key_t  n,
  output key_t  phi,
  output key_t  p_minus_1,
  output key_t  q_minus_1,
  output key_t  e,
  output key_t  d
);
  typedef enum logic [2:0] {S_IDLE, S_MUL, S_TRY, S_WAIT, S_CHECK} state_t;

  state_t state;
  data_t  p_r, q_r;
  prod_t  n_prod, phi_prod;

  logic inv_start, inv_busy, inv_done;
  key_t inv_gcd, inv_val;

  dadda_multiplier_8x8 u_mul_n   (.a(p_r),         .b(q_r),         .p(n_prod));
  dadda_multiplier_8x8 u_mul_phi (.a(p_r - 1'b1),  .b(q_r - 1'b1),  .p(phi_prod));

  mod_inverse #(.W(KEY_W)) u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .a(e), .m(phi),
    .busy(inv_busy), .done(inv_done), .gcd(inv_gcd), .inv(inv_val)
  );

  assign inv_start = (state == S_TRY) && (e < phi);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      error     <= 1'b0;
      p_r       <= '0;
      q_r       <= '0;
      n         <= '0;
      phi       <= '0;
      p_minus_1 <= '0;
      q_minus_1 <= '0;
      e         <= '0;
      d         <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          p_r   <= p;
          q_r   <= q;
          error <= 1'b0;
          state <= S_MUL;
        end
        S_MUL: begin
          n         <= KEY_W'(n_prod);
          phi       <= KEY_W'(phi_prod);
          p_minus_1 <= KEY_W'(p_r) - 1'b1;
          q_minus_1 <= KEY_W'(q_r) - 1'b1;
          e         <= KEY_W'(E_FIRST);
          d         <= '0;
          if (p_r < DATA_W'(2) || q_r < DATA_W'(2)) begin
            error <= 1'b1;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_TRY;
          end
        end
        S_TRY: begin
          if (e < phi) begin
            state <= S_WAIT;       // mod_inverse started this cycle
          end else begin
            error <= 1'b1;         // no exponent left to try
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_WAIT: if (inv_done) state <= S_CHECK;
        S_CHECK: begin
          if (inv_gcd == KEY_W'(1)) begin
            d     <= inv_val;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            e     <= e + KEY_W'(2);
            state <= S_TRY;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
