// mod_exp: modular exponentiation unit, result = base^exponent mod modulus.
//
// Right-to-left square-and-multiply with two inexact multipliers working side by side: in every
// step one multiplier forms r * b and the other b * b, and each product is reduced modulo n by a
// combinational mod_reduce. The running result r takes r*b mod n when the current exponent bit is
// 1; the running power b always takes b*b mod n. The exponent is scanned LSB first over all
// EXP_W bits, so the time does not depend on the key. The same unit serves as the encryption block
// (base M, exponent e) and the decryption block (base C, exponent d).
//
// Interface: a one-cycle 'start' while idle latches base, exponent and modulus; 'busy' is high
// while the unit works; 'done' pulses for one cycle EXP_W cycles after the start edge, and 'result'
// holds its value until the next start. A start while busy is ignored. Reset (rst_n, active low,
// synchronous) clears the controller. Because the multipliers are inexact the result can differ
// from the exact power when large operands meet; with modulus 1 the result is 0 and with exponent 0
// it is 1. Exponentiation by repeated multiplication and reduction modulo n, and the inexact
// multiplier inside it, follow the design description; the algorithm, the two-multiplier step and
// the handshake are this design's choices.
module mod_exp
  import rsa_pkg::*;
#(
  parameter int unsigned EXP_W = DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  data_t            base,
  input  logic [EXP_W-1:0] exponent,
  input  data_t            modulus,
  output logic             busy,
  output logic             done,
  output data_t            result
);
  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t                    state;
  data_t                     r, b, n;
  logic [EXP_W-1:0]          e_sh;
  logic [$clog2(EXP_W+1)-1:0] cnt;

  prod_t rb_prod, bb_prod;
  data_t rb_mod,  bb_mod;

  dadda_multiplier_8x8 u_mul_rb (.a(r), .b(b), .p(rb_prod));
  dadda_multiplier_8x8 u_mul_bb (.a(b), .b(b), .p(bb_prod));

  mod_reduce #(.X_W(PROD_W), .N_W(DATA_W)) u_red_rb (.x(rb_prod), .n(n), .r(rb_mod));
  mod_reduce #(.X_W(PROD_W), .N_W(DATA_W)) u_red_bb (.x(bb_prod), .n(n), .r(bb_mod));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      r     <= '0;
      b     <= '0;
      n     <= '0;
      e_sh  <= '0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r     <= (modulus == DATA_W'(1)) ? '0 : DATA_W'(1);
          b     <= base;
          n     <= modulus;
          e_sh  <= exponent;
          cnt   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (e_sh[0]) r <= rb_mod;
          b    <= bb_mod;
          e_sh <= e_sh >> 1;
          cnt  <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(EXP_W - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy   = (state == S_RUN);
  assign result = r;

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
