// sdsm_kb_gen -- keystream block (KB) generator.
//
// Computes R = ENC(P_0,k) || ENC(P_1,k) || ... for one cache block, where
// P = f(S, VA): with seed S = 0 (a block's initial encryption) P is the
// block's virtual address, otherwise it is the seed with a '1' marker in
// front, independent of the address. P_i appends the sub-block index i.
// R_0 sits in the most significant 128 bits of `kb`.
//
// Interface: pulse `start` with seed/va/key while `busy` is low; `done`
// pulses when `kb` holds the result (it stays until the next start). The
// N_SUB cipher blocks are computed one after another on one AES core, so a
// KB takes N_SUB*12+1 cycles from start to done (49 for a 64-byte block). The seed rule and
// the index concatenation follow the design; sharing one AES core is this
// implementation's choice.
module sdsm_kb_gen
  import sdsm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  seed_t    seed,
  input  baddr_t   va,
  input  aes_blk_t key,
  output logic     busy,
  output logic     done,
  output block_t   kb
);

  localparam int CNT_W = $clog2(N_SUB + 1);

  seed_t             seed_q;
  baddr_t            va_q;
  aes_blk_t          key_q;
  logic [CNT_W-1:0]  idx_q;
  logic              aes_start, aes_busy, aes_done;
  aes_blk_t          aes_ct;
  logic              launch_q;

  sdsm_aes128 u_aes (
    .clk, .rst_n,
    .start (aes_start),
    .key   (key_q),
    .pt    (make_cipher_input(seed_q, va_q, IDX_W'(idx_q))),
    .busy  (aes_busy),
    .done  (aes_done),
    .ct    (aes_ct)
  );

  assign aes_start = launch_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      launch_q <= 1'b0;
      idx_q    <= '0;
      seed_q   <= '0;
      va_q     <= '0;
      key_q    <= '0;
      kb       <= '0;
    end else begin
      done     <= 1'b0;
      launch_q <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          seed_q   <= seed;
          va_q     <= va;
          key_q    <= key;
          idx_q    <= '0;
          launch_q <= 1'b1;
        end
      end else if (aes_done) begin
        kb[BLOCK_BITS - 1 - AES_W*int'(idx_q) -: AES_W] <= aes_ct;
        if (int'(idx_q) == N_SUB - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx_q    <= idx_q + 1'b1;
          launch_q <= 1'b1;
        end
      end
    end
  end

  // The AES core is only started when idle.
  assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> !aes_busy);

endmodule
