// rsa_top: RSA engine with an inexact multiplier.
//
// One operation runs the three stages of the engine in order: key generation from p and q
// (n, phi, e, d), encryption of the message, cipher = msg^e mod n, and decryption of that
// ciphertext, plain = cipher^d mod n. Every multiplication, in the key generator and in both
// exponentiation units, goes through the inexact 8x8 Dadda/5:2 multiplier. Small products are
// exact, but an exponentiation chains up to 16 products, so 'cipher' and 'plain' often differ from
// the exact RSA values: over all prime pairs with n below 256, roughly 40% of messages come back
// unchanged.
//
// The exponentiation datapath is 8 bits wide, so n must fit in 8 bits: a larger p*q raises
// key_error, as does a failed key search. A message not below n raises msg_error and skips the
// exponentiations. Interface: a one-cycle 'start' while idle latches p, q and msg; 'busy' is high
// until 'done' pulses for one cycle; outputs hold until the next start. Timing: if the key
// generator needs K cycles from its start to its done, 'done' follows K + 22 cycles after the edge
// that takes 'start' (two 8-cycle exponentiations and 6 cycles of hand-over between the stages).
// Reset (rst_n, active low, synchronous) clears the controller. The stage order and the blocks
// follow the design description; the handshake, the error flags and running decryption right
// after encryption are this design's choices.
module rsa_top
  import rsa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t p,
  input  data_t q,
  input  data_t msg,
  output logic  busy,
  output logic  done,
  output logic  key_error,
  output logic  msg_error,
  output key_t  n,
  output key_t  phi,
  output key_t  p_minus_1,
  output key_t  q_minus_1,
  output key_t  e,
  output key_t  d,
  output data_t cipher,
  output data_t plain
);
  typedef enum logic [2:0] {S_IDLE, S_KEY, S_ENC, S_DEC, S_END} state_t;

  state_t state;
  data_t  msg_r;

  logic kg_start, kg_busy, kg_done, kg_error;
  logic enc_start, enc_busy, enc_done;
  logic dec_start, dec_busy, dec_done;
  data_t n8;

  key_generation u_keygen (
    .clk(clk), .rst_n(rst_n), .start(kg_start), .p(p), .q(q),
    .busy(kg_busy), .done(kg_done), .error(kg_error),
    .n(n), .phi(phi), .p_minus_1(p_minus_1), .q_minus_1(q_minus_1), .e(e), .d(d)
  );

  assign n8 = n[DATA_W-1:0];

  mod_exp u_encrypt (
    .clk(clk), .rst_n(rst_n), .start(enc_start),
    .base(msg_r), .exponent(e[DATA_W-1:0]), .modulus(n8),
    .busy(enc_busy), .done(enc_done), .result(cipher)
  );

  mod_exp u_decrypt (
    .clk(clk), .rst_n(rst_n), .start(dec_start),
    .base(cipher), .exponent(d[DATA_W-1:0]), .modulus(n8),
    .busy(dec_busy), .done(dec_done), .result(plain)
  );

  assign kg_start = (state == S_IDLE) && start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      key_error <= 1'b0;
      msg_error <= 1'b0;
      msg_r     <= '0;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
    end else begin
      done      <= 1'b0;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          msg_r     <= msg;
          key_error <= 1'b0;
          msg_error <= 1'b0;
          state     <= S_KEY;
        end
        S_KEY: if (kg_done) begin
          if (kg_error || n > KEY_W'((1 << DATA_W) - 1)) begin
            key_error <= 1'b1;
            state     <= S_END;
          end else if (KEY_W'(msg_r) >= n) begin
            msg_error <= 1'b1;
            state     <= S_END;
          end else begin
            enc_start <= 1'b1;
            state     <= S_ENC;
          end
        end
        S_ENC: if (enc_done) begin
          dec_start <= 1'b1;
          state     <= S_DEC;
        end
        S_DEC: if (dec_done) state <= S_END;
        S_END: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
