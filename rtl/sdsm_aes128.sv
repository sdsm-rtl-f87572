// sdsm_aes128 -- iterative AES-128 encryption, the block cipher ENC(P, k)
// that turns a cipher input P and a secret key k into a pseudo-random block.
//
// One round per clock: the cycle that sees `start` loads P ^ k, the next ten
// cycles apply the ten rounds (the last without MixColumns) while the round
// key is expanded on the fly. `done` pulses with `ct` valid 11 cycles after
// `start`; `busy` is high in between and `start` is ignored while busy.
// The choice of AES follows the design; the one-round-per-cycle structure is
// this implementation's choice (it keeps a 4-block keystream well under the
// 80-cycle KB budget the design assumes).
module sdsm_aes128
  import sdsm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  aes_blk_t key,
  input  aes_blk_t pt,
  output logic     busy,
  output logic     done,
  output aes_blk_t ct
);

  aes_blk_t   state_q, rkey_q;
  logic [3:0] round_q;     // 1..10 while busy
  logic [7:0] rcon_q;

  aes_blk_t rkey_n, state_n;
  always_comb begin
    rkey_n  = next_round_key(rkey_q, rcon_q);
    state_n = sub_shift(state_q);
    if (round_q != 4'd10) state_n = mix_columns(state_n);
    state_n = state_n ^ rkey_n;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      state_q <= '0;
      rkey_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          state_q <= pt ^ key;
          rkey_q  <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
        end
      end else begin
        state_q <= state_n;
        rkey_q  <= rkey_n;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = state_q;

endmodule
