// sdsm_kb_cache -- a sender's cache of outstanding keystream blocks (KBs).
//
// Each entry holds a seed received from a TCM, the secure process it belongs
// to and, once computed, the address-independent KB for that seed. Entries
// go FREE -> WAIT (seed known) -> CALC (KB being computed) -> READY, and back
// to FREE when the KB has encrypted one block; a KB is never used twice.
// Lookups: by (process, seed) when a TCM forwards a request naming the seed,
// and "any ready, unreserved KB of a process" for a local eviction; an
// entry is reserved while the TCM is asked to withdraw its seed.
// All lookups are combinational; updates take effect at the next edge.
// The cache and its size (10 entries) follow the design; the state encoding
// and the reservation bit are this implementation's choices.
module sdsm_kb_cache
  import sdsm_pkg::*;
#(
  parameter int N_ENTRIES = 10,
  parameter int N_PROC    = 4,
  localparam int IW       = $clog2(N_ENTRIES),
  localparam int CW       = $clog2(N_ENTRIES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // allocate a new entry for a granted seed
  input  logic          alloc_valid,
  input  pid_t          alloc_pid,
  input  seed_t         alloc_seed,
  output logic          full,
  // next entry whose KB still has to be computed
  output logic          pend_valid,
  output logic [IW-1:0] pend_idx,
  output pid_t          pend_pid,
  output seed_t         pend_seed,
  input  logic          calc_start,   // marks pend_idx as being computed
  input  logic          fill_valid,
  input  logic [IW-1:0] fill_idx,
  input  block_t        fill_kb,
  // lookup by seed (request forwarded by the TCM)
  input  pid_t          lk_pid,
  input  seed_t         lk_seed,
  output logic          lk_hit,
  output logic [IW-1:0] lk_idx,
  output logic          lk_ready,
  output block_t        lk_kb,
  // any ready KB of a process (local eviction)
  input  pid_t          ev_pid,
  output logic          ev_hit,
  output logic [IW-1:0] ev_idx,
  output seed_t         ev_seed,
  output block_t        ev_kb,
  input  logic          reserve_valid,
  input  logic          unreserve_valid,
  input  logic [IW-1:0] res_idx,
  input  logic          free_valid,
  input  logic [IW-1:0] free_idx,
  // occupancy
  output logic [CW-1:0] used,
  output logic [CW-1:0] held [N_PROC]
);

  typedef enum logic [1:0] {E_FREE, E_WAIT, E_CALC, E_READY} est_e;

  est_e   st   [N_ENTRIES];
  pid_t   pidq [N_ENTRIES];
  seed_t  sd   [N_ENTRIES];
  block_t kb   [N_ENTRIES];
  logic   rsv  [N_ENTRIES];

  logic          free_found;
  logic [IW-1:0] free_slot;

  always_comb begin
    free_found = 1'b0; free_slot = '0;
    pend_valid = 1'b0; pend_idx = '0;
    lk_hit = 1'b0;     lk_idx = '0;
    ev_hit = 1'b0;     ev_idx = '0;
    used = '0;
    for (int p = 0; p < N_PROC; p++) held[p] = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      if (st[i] == E_FREE) begin
        free_found = 1'b1; free_slot = IW'(i);
      end else begin
        used = used + 1'b1;
        if (int'(pidq[i]) < N_PROC) held[int'(pidq[i])] = held[int'(pidq[i])] + 1'b1;
      end
      if (st[i] == E_WAIT) begin
        pend_valid = 1'b1; pend_idx = IW'(i);
      end
      if (st[i] != E_FREE && pidq[i] == lk_pid && sd[i] == lk_seed) begin
        lk_hit = 1'b1; lk_idx = IW'(i);
      end
      if (st[i] == E_READY && !rsv[i] && pidq[i] == ev_pid) begin
        ev_hit = 1'b1; ev_idx = IW'(i);
      end
    end
    full      = !free_found;
    pend_pid  = pidq[pend_idx];
    pend_seed = sd[pend_idx];
    lk_ready  = lk_hit && (st[lk_idx] == E_READY);
    lk_kb     = kb[lk_idx];
    ev_seed   = sd[ev_idx];
    ev_kb     = kb[ev_idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ENTRIES; i++) begin
        st[i]   <= E_FREE;
        rsv[i]  <= 1'b0;
        pidq[i] <= '0;
        sd[i]   <= '0;
      end
    end else begin
      if (alloc_valid && free_found) begin
        st[free_slot]   <= E_WAIT;
        pidq[free_slot] <= alloc_pid;
        sd[free_slot]   <= alloc_seed;
        rsv[free_slot]  <= 1'b0;
      end
      if (calc_start && pend_valid) st[pend_idx] <= E_CALC;
      if (fill_valid) begin
        st[fill_idx] <= E_READY;
        kb[fill_idx] <= fill_kb;
      end
      if (reserve_valid)   rsv[res_idx] <= 1'b1;
      if (unreserve_valid) rsv[res_idx] <= 1'b0;
      if (free_valid) begin
        st[free_idx]  <= E_FREE;
        rsv[free_idx] <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(alloc_valid && !free_found))
    else $error("KB cache allocation while full");
  assert property (@(posedge clk) disable iff (!rst_n) free_valid |-> st[free_idx] == E_READY)
    else $error("freeing a KB that was never ready");

endmodule
