// Iterative AES-128 encryption core, one round per clock, with an external
// (dynamic) S-box.
//
// Round 0 adds the cipher key to the plaintext. Rounds 1..9 apply SubBytes,
// ShiftRows, MixColumns and AddRoundKey; round 10 skips MixColumns. The round
// key for round r is computed on the fly from the one for round r-1, so only
// one round key is stored.
//
// Interface: start (taken while not busy) samples pt and key on edge 0 and
// performs round 0. Edges 1..10 perform rounds 1..10. done pulses and ct
// holds the ciphertext in the cycle after edge 10, i.e. 10 clocks after
// start. ct then holds until the next block finishes. sbox must stay
// constant while busy. Synchronous active-high reset.
//
// The round structure (round 0, repeated full rounds, a last round without
// MixColumns) follows the reference block diagram; the round count of
// AES-128, one round per clock and the on-the-fly key schedule are this
// design's choices.
module aes_encrypt
  import dsbox_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  state_t     pt,
  input  state_t     key,
  input  sbox_t      sbox,
  output logic       busy,
  output logic       done,
  output logic [3:0] round,
  output state_t     ct
);
  typedef enum logic {A_IDLE, A_RUN} aes_state_e;

  aes_state_e st;
  state_t     s_q, rk_q;
  logic [7:0] rcon_q;

  state_t     s0, s_sb, s_sr, s_mc, s_pre, s_next, rk_next;
  logic [7:0] rcon_next;
  logic       last;

  add_round_key u_ark0 (.s_in(pt), .rk(key), .s_out(s0));

  key_expansion u_kexp (
    .rk(rk_q), .rcon(rcon_q), .sbox(sbox), .rk_next(rk_next), .rcon_next(rcon_next)
  );

  sub_bytes     u_sb  (.s_in(s_q),  .sbox(sbox), .s_out(s_sb));
  shift_rows    u_sr  (.s_in(s_sb), .s_out(s_sr));
  mix_columns   u_mc  (.s_in(s_sr), .s_out(s_mc));

  assign last  = (round == 4'(AES_NR));
  assign s_pre = last ? s_sr : s_mc;

  add_round_key u_ark (.s_in(s_pre), .rk(rk_next), .s_out(s_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= A_IDLE;
      s_q    <= '0;
      rk_q   <= '0;
      rcon_q <= 8'h01;
      round  <= '0;
      done   <= 1'b0;
      ct     <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        A_IDLE: if (start) begin
          s_q    <= s0;
          rk_q   <= key;
          rcon_q <= 8'h01;
          round  <= 4'd1;
          st     <= A_RUN;
        end
        A_RUN: begin
          s_q    <= s_next;
          rk_q   <= rk_next;
          rcon_q <= rcon_next;
          if (last) begin
            ct    <= s_next;
            done  <= 1'b1;
            round <= '0;
            st    <= A_IDLE;
          end else begin
            round <= round + 4'd1;
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign busy = (st == A_RUN);
endmodule
