// mod_inverse: sequential modular inverse, inv = a^-1 mod m, and gcd(a, m).
//
// A subtractive extended Euclid. Two pairs (r0, t0) and (r1, t1) start as (m, 0) and (a, 1) and
// keep the invariant r == t * a (mod m). In each cycle the smaller r is subtracted from the larger
// and its t from the other t, modulo m. When one r reaches 0 the other is gcd(a, m) and its t is
// the inverse, valid when the gcd is 1. No multiplier or divider is needed; the number of cycles is
// at most about a + m.
//
// Interface: a one-cycle 'start' while idle latches a and m; 'busy' stays high until 'done' pulses
// for one cycle, after which 'gcd' and 'inv' hold. m must be at least 2. Reset (rst_n, active low,
// synchronous) clears the controller. That d is found as the modular inverse of e modulo phi
// follows the design description; the subtractive algorithm and the handshake are this design's
// choices.
module mod_inverse #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] gcd,
  output logic [W-1:0] inv
);
  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t         state;
  logic [W-1:0]   r0, r1, t0, t1, mod;

  // (x - y) mod mod for x, y already below mod.
  function automatic logic [W-1:0] sub_mod(input logic [W-1:0] x, input logic [W-1:0] y,
                                           input logic [W-1:0] md);
    return (x >= y) ? (x - y) : (x + (md - y));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      r0    <= '0;
      r1    <= '0;
      t0    <= '0;
      t1    <= '0;
      mod   <= '0;
      gcd   <= '0;
      inv   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r0    <= m;
          t0    <= '0;
          r1    <= a;
          t1    <= (m == W'(1)) ? '0 : W'(1);
          mod   <= m;
          state <= S_RUN;
        end
        S_RUN: begin
          if (r1 == '0) begin
            gcd   <= r0;
            inv   <= t0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (r0 == '0) begin
            gcd   <= r1;
            inv   <= t1;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (r0 >= r1) begin
            r0 <= r0 - r1;
            t0 <= sub_mod(t0, t1, mod);
          end else begin
            r1 <= r1 - r0;
            t1 <= sub_mod(t1, t0, mod);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
