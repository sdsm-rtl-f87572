// sdsm_node -- the trusted area of one secure core in the shared-memory
// system: private cache and memory, secret keys, one sender-side cache of
// outstanding keystream blocks (KBs) and a single incoming KB entry.
//
// Storage. Every block the core holds lives in its private memory
// encrypted, next to the seed it was encrypted with (seed 0 = initial,
// address-based encryption of the program image), and may also sit in the
// private cache as cleartext (memory is inclusive). Per block the node keeps
// a permission I/S/M. Blocks a with a % N_CORES == NODE_ID start with M.
//
// Core side (cpu_*): read, write (whole block) or evict one block.
//   * hit: served from the cache; a memory-only block is first decrypted
//     (KB from its stored seed) into the cache;
//   * miss or write without M: REQ to the home TCM, then wait for the data;
//   * evict of a modified block: encrypted with a ready outstanding KB of
//     the block's process after the TCM confirms it withdrew that seed
//     (SEED_USED / USED_ACK); otherwise waits for a KB.
// Requestor side: SEED_TO_REQ starts the incoming KB at once; the DATA that
// follows is XORed with it (no wait if the KB is ready, `kb_hidden`).
// Sender side: on FWD the block is taken from the cache (Fig. 2a) or loaded
// and decrypted from memory (Fig. 2b), XORed with the pre-generated KB the
// TCM named by its seed and sent to the requestor; a fresh seed means no KB
// was prepared, so it is computed on demand. Served requests train the
// process monitor; free KB slots are refilled for the process it picks, by
// SEED_REQ to the TCMs in turn and then a KB computation per granted seed;
// a process should be enabled (proc_en) only after its key is loaded. An
// eviction waiting on a process that holds no KB asks for one first.
// Two KB generators: one for outstanding KBs, one for the incoming entry and
// memory decryption.
// Messages are handled one at a time. The node sits on three virtual
// networks: it sends requests (REQ, SEED_REQ, SEED_USED) to the TCMs on
// out_*, receives TCM control messages on in_*, and exchanges DATA (plus the
// TCM's SEED_TO_REQ, which must stay ahead of its DATA) on din_*/dout_*.
// DATA and SEED_TO_REQ are always taken when idle; a control message is
// taken only with a free DATA slot (a FWD produces one DATA), and a core
// operation only with a free request slot. So handling never blocks on
// sending and the three networks cannot wait on each other in a cycle.
// Following the design: seed rule, outstanding KBs per process, single
// incoming KB, oldest-seed forwarding, re-encryption on send, decryption
// with the stored seed on a sender miss. This implementation's choices:
// the core-side interface, whole-block writes, one outstanding miss per
// core, seed withdrawal for evictions, the fresh-seed fallback.
module sdsm_node
  import sdsm_pkg::*;
#(
  parameter int NODE_ID    = 0,
  parameter int N_CORES    = 256,
  parameter int N_TCM      = 1,
  parameter int N_PROC     = 4,
  parameter int BLOCKS     = 32,
  parameter int KB_ENTRIES = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // setup: keys and the initial (encrypted) memory image
  input  logic              key_we,
  input  pid_t              key_pid,
  input  aes_blk_t          key_val,
  input  logic [N_PROC-1:0] proc_en,
  input  logic              ld_we,
  input  baddr_t            ld_addr,
  input  block_t            ld_data,
  // core side
  input  logic              cpu_valid,
  output logic              cpu_ready,
  input  cpu_op_e           cpu_op,
  input  pid_t              cpu_pid,
  input  baddr_t            cpu_addr,
  input  block_t            cpu_wdata,
  output logic              cpu_done,
  output block_t            cpu_rdata,
  // network: control from the TCMs in, requests to the TCMs out
  input  logic              in_valid,
  output logic              in_ready,
  input  msg_t              in_msg,
  output logic              out_valid,
  input  logic              out_ready,
  output msg_t              out_msg,
  // network: DATA and announced seeds in, DATA out
  input  logic              din_valid,
  output logic              din_ready,
  input  msg_t              din_msg,
  output logic              dout_valid,
  input  logic              dout_ready,
  output msg_t              dout_msg,
  output node_ev_t          ev
);
  localparam int IW = $clog2(KB_ENTRIES);
  localparam int CW = $clog2(KB_ENTRIES + 1);

  typedef enum logic [3:0] {
    N_IDLE, N_CPU, N_MSG, N_LOAD, N_LOAD_W, N_FWD_KB, N_FWD_OD, N_FWD_SEND,
    N_DATA_W, N_DATA_RK, N_DATA_FIN
  } nst_e;
  typedef enum logic [1:0] {PD_NONE, PD_DATA, PD_EV_KB, PD_EV_ACK} pend_e;

  nst_e   st_q;
  pend_e  pst_q;

  // block state
  perm_e  perm   [BLOCKS];
  logic   cached [BLOCKS];
  logic   dirty  [BLOCKS];
  block_t cdata  [BLOCKS];
  block_t menc   [BLOCKS];
  seed_t  mseed  [BLOCKS];
  aes_blk_t keys [N_PROC];

  // current message, pending core operation
  msg_t    m_q;
  cpu_op_e op_q;
  pid_t    opid_q;
  baddr_t  oaddr_q;
  block_t  owdata_q;
  logic [IW-1:0] res_q;
  logic    load_for_fwd_q;
  baddr_t  load_addr_q;
  pid_t    load_pid_q;
  block_t  clear_q, kb_q;
  logic    late_q;

  // single incoming KB entry
  logic   in_v_q, in_rdy_q;
  seed_t  in_seed_q;
  pid_t   in_pid_q;
  block_t in_kb_q;

  // -------------------------------------------------------------- helpers
  function automatic int bi(baddr_t a);
    return int'(a) % BLOCKS;
  endfunction
  function automatic int pi(pid_t p);
    return int'(p) % N_PROC;
  endfunction

  // ----------------------------------------------------------- out queue
  logic q_in_valid, q_in_ready;
  msg_t q_in;
  logic [$clog2(5)-1:0] q_free;
  sdsm_fifo #(.T(msg_t), .DEPTH(4)) u_outq (
    .clk, .rst_n,
    .in_valid (q_in_valid), .in_ready (q_in_ready), .in_data (q_in),
    .out_valid, .out_ready, .out_data (out_msg), .free (q_free)
  );
  // DATA queue
  logic dq_in_valid, dq_in_ready;
  msg_t dq_in;
  logic [$clog2(3)-1:0] dq_free;
  sdsm_fifo #(.T(msg_t), .DEPTH(2)) u_datq (
    .clk, .rst_n,
    .in_valid (dq_in_valid), .in_ready (dq_in_ready), .in_data (dq_in),
    .out_valid (dout_valid), .out_ready (dout_ready), .out_data (dout_msg),
    .free (dq_free)
  );
  msg_t msg_sel;
  assign msg_sel = din_valid ? din_msg : in_msg;

  // ------------------------------------------------------- KB generators
  logic   kbo_start, kbo_busy, kbo_done;
  seed_t  kbo_seed;
  baddr_t kbo_va;
  aes_blk_t kbo_key;
  block_t kbo_kb;
  logic   kbo_fsm_q;            // result belongs to the FSM (on-demand)
  logic [IW-1:0] kbo_idx_q;     // else to this KB cache entry
  sdsm_kb_gen u_kbo (.clk, .rst_n, .start (kbo_start), .seed (kbo_seed), .va (kbo_va),
                     .key (kbo_key), .busy (kbo_busy), .done (kbo_done), .kb (kbo_kb));

  logic   kbi_start, kbi_busy, kbi_done;
  seed_t  kbi_seed;
  baddr_t kbi_va;
  aes_blk_t kbi_key;
  block_t kbi_kb;
  logic   kbi_fsm_q;            // result belongs to the FSM, else incoming entry
  sdsm_kb_gen u_kbi (.clk, .rst_n, .start (kbi_start), .seed (kbi_seed), .va (kbi_va),
                     .key (kbi_key), .busy (kbi_busy), .done (kbi_done), .kb (kbi_kb));

  // ------------------------------------------------------------ KB cache
  logic          kc_alloc, kc_full, kc_pend_v, kc_calc;
  logic [IW-1:0] kc_pend_idx, kc_lk_idx, kc_ev_idx, kc_res_idx, kc_free_idx;
  pid_t          kc_pend_pid, kc_lk_pid;
  seed_t         kc_pend_seed, kc_lk_seed, kc_ev_seed;
  logic          kc_lk_hit, kc_lk_ready, kc_ev_hit;
  block_t        kc_lk_kb, kc_ev_kb;
  logic          kc_reserve, kc_unreserve, kc_free;
  logic [CW-1:0] kc_used;
  logic [CW-1:0] kc_held [N_PROC];

  sdsm_kb_cache #(.N_ENTRIES(KB_ENTRIES), .N_PROC(N_PROC)) u_kbc (
    .clk, .rst_n,
    .alloc_valid (kc_alloc), .alloc_pid (m_q.pid), .alloc_seed (m_q.seed), .full (kc_full),
    .pend_valid (kc_pend_v), .pend_idx (kc_pend_idx), .pend_pid (kc_pend_pid),
    .pend_seed (kc_pend_seed), .calc_start (kc_calc),
    .fill_valid (kbo_done && !kbo_fsm_q), .fill_idx (kbo_idx_q), .fill_kb (kbo_kb),
    .lk_pid (kc_lk_pid), .lk_seed (kc_lk_seed), .lk_hit (kc_lk_hit), .lk_idx (kc_lk_idx),
    .lk_ready (kc_lk_ready), .lk_kb (kc_lk_kb),
    .ev_pid (opid_q), .ev_hit (kc_ev_hit), .ev_idx (kc_ev_idx), .ev_seed (kc_ev_seed),
    .ev_kb (kc_ev_kb),
    .reserve_valid (kc_reserve), .unreserve_valid (kc_unreserve), .res_idx (kc_res_idx),
    .free_valid (kc_free), .free_idx (kc_free_idx),
    .used (kc_used), .held (kc_held)
  );

  // ---------------------------------------------------- process monitor
  localparam int HW = CW + 1;
  logic [CW-1:0] inflight [N_PROC];   // seeds asked for, not yet granted
  logic [HW-1:0] held [N_PROC];
  logic          pm_req, pm_pick_v;
  pid_t          pm_pick;
  logic [7:0]    pm_score [N_PROC];
  logic [CW+3:0] committed;

  always_comb begin
    committed = (CW+4)'(kc_used);
    for (int p = 0; p < N_PROC; p++) begin
      held[p]   = HW'(kc_held[p]) + HW'(inflight[p]);
      committed = committed + (CW+4)'(inflight[p]);
    end
  end

  sdsm_proc_monitor #(.N_PROC(N_PROC), .HELD_W(HW)) u_pm (
    .clk, .rst_n, .req_valid (pm_req), .req_pid (m_q.pid), .enable (proc_en),
    .held (held), .pick_valid (pm_pick_v), .pick_pid (pm_pick), .score (pm_score)
  );

  logic [$clog2(N_TCM+1)-1:0] tcm_rr_q;

  // --------------------------------------------------------- control
  logic take_msg, take_cpu, ev_try, refill_push, pend_kb_start;
  pid_t refill_pid;
  int   ma, la, oa;

  function automatic msg_t mk(msg_type_e t, int dst);
    msg_t m;
    m       = '0;
    m.mtype = t;
    m.src   = node_id_t'(NODE_ID);
    m.dst   = node_id_t'(dst);
    return m;
  endfunction

  always_comb begin
    ma = bi(m_q.addr);
    la = bi(load_addr_q);
    oa = bi(oaddr_q);

    in_ready    = 1'b0;
    din_ready   = 1'b0;
    dq_in_valid = 1'b0;
    dq_in       = '0;
    cpu_ready   = 1'b0;
    take_msg    = 1'b0;
    take_cpu    = 1'b0;
    ev_try      = 1'b0;
    q_in_valid  = 1'b0;
    q_in        = '0;
    kc_alloc    = 1'b0;
    kc_reserve  = 1'b0;
    kc_unreserve = 1'b0;
    kc_res_idx  = res_q;
    kc_free     = 1'b0;
    kc_free_idx = kc_lk_idx;
    kc_lk_pid   = m_q.pid;
    kc_lk_seed  = m_q.seed;
    kbo_start   = 1'b0;
    kbo_seed    = m_q.seed;
    kbo_va      = m_q.addr;
    kbo_key     = keys[pi(m_q.pid)];
    kbi_start   = 1'b0;
    kbi_seed    = m_q.seed;
    kbi_va      = m_q.addr;
    kbi_key     = keys[pi(m_q.pid)];
    kc_calc     = 1'b0;
    pm_req      = 1'b0;
    refill_push = 1'b0;
    pend_kb_start = 1'b0;

    case (st_q)
      N_IDLE: if (din_valid) begin
        din_ready = 1'b1;
        take_msg  = 1'b1;
      end else if (in_valid && dq_free >= 1) begin
        in_ready = 1'b1;
        take_msg = 1'b1;
      end else if (q_free >= 1) begin
        if (pst_q == PD_EV_KB && kc_ev_hit) begin
          ev_try       = 1'b1;
          kc_reserve   = 1'b1;
          kc_res_idx   = kc_ev_idx;
          q_in_valid   = 1'b1;
          // to the TCM that granted the seed: its id is the seed's top byte
          q_in         = mk(M_SEED_USED, N_CORES + (int'(kc_ev_seed[SEED_W-1 -: 8]) % N_TCM));
          q_in.pid     = opid_q;
          q_in.addr    = oaddr_q;
          q_in.seed    = kc_ev_seed;
        end else if (cpu_valid && pst_q == PD_NONE) begin
          cpu_ready = 1'b1;
          take_cpu  = 1'b1;
        end
      end
      N_CPU: begin
        // the pending operation was just latched
        if (!(perm[oa] != P_I && (op_q == OP_RD || op_q == OP_EV)) &&
            !(perm[oa] == P_M && op_q == OP_WR) && op_q != OP_EV) begin
          q_in_valid = 1'b1;
          q_in       = mk((op_q == OP_WR) ? M_REQ_WR : M_REQ_RD, N_CORES + (oa % N_TCM));
          q_in.pid   = opid_q;
          q_in.addr  = oaddr_q;
          q_in.rw    = (op_q == OP_WR);
        end
      end
      N_MSG: case (m_q.mtype)
        M_SEED_GRANT: kc_alloc = m_q.flag;
        M_USED_ACK: begin
          if (m_q.flag) begin
            kc_free = 1'b1;
            kc_free_idx = res_q;
          end else begin
            kc_unreserve = 1'b1;
          end
        end
        M_SEED_TO_REQ: kbi_start = !kbi_busy;
        M_FWD: pm_req = 1'b1;
        default: ;
      endcase
      N_LOAD: begin
        kbi_start = !kbi_busy;
        kbi_seed  = mseed[la];
        kbi_va    = load_addr_q;
        kbi_key   = keys[pi(load_pid_q)];
      end
      N_FWD_KB: begin
        if (kc_lk_hit) begin
          if (kc_lk_ready) kc_free = 1'b1;
        end else begin
          kbo_start = !kbo_busy;     // fresh seed: compute now
        end
      end
      N_DATA_RK: kbi_start = !kbi_busy;
      N_FWD_SEND: begin
        dq_in_valid = 1'b1;
        dq_in       = mk(M_DATA, int'(m_q.req));
        dq_in.pid   = m_q.pid;
        dq_in.addr  = m_q.addr;
        dq_in.seed  = m_q.seed;
        dq_in.rw    = m_q.rw;
        dq_in.data  = clear_q ^ kb_q;
      end
      default: ;
    endcase

    // background: compute KBs for granted seeds when the FSM does not need
    // the generator
    if (!kbo_start && !kbo_busy && kc_pend_v) begin
      pend_kb_start = 1'b1;
      kbo_start     = 1'b1;
      kbo_seed      = kc_pend_seed;
      kbo_va        = '0;
      kbo_key       = keys[pi(kc_pend_pid)];
      kc_calc       = 1'b1;
    end
    // background: ask for seeds while KB slots are uncommitted; always leave
    // one queue slot for the FSM
    // (a waiting eviction of a process with no KB at all goes first)
    refill_pid = (pst_q == PD_EV_KB && held[pi(opid_q)] == '0) ? opid_q : pm_pick;
    if (!q_in_valid && q_free >= 2 && (pm_pick_v || refill_pid != pm_pick) &&
        committed < (CW+4)'(KB_ENTRIES)) begin
      refill_push = 1'b1;
      q_in_valid  = 1'b1;
      q_in        = mk(M_SEED_REQ, N_CORES + int'(tcm_rr_q));
      q_in.pid    = refill_pid;
    end
  end

  // --------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    ev <= '0;
    cpu_done <= 1'b0;
    if (!rst_n) begin
      st_q      <= N_IDLE;
      pst_q     <= PD_NONE;
      m_q       <= '0;
      in_v_q    <= 1'b0;
      in_rdy_q  <= 1'b0;
      in_seed_q <= '0;
      in_pid_q  <= '0;
      kbo_fsm_q <= 1'b0;
      kbo_idx_q <= '0;
      kbi_fsm_q <= 1'b0;
      tcm_rr_q  <= '0;
      late_q    <= 1'b0;
      res_q     <= '0;
      cpu_rdata <= '0;
      load_for_fwd_q <= 1'b0;
      for (int p = 0; p < N_PROC; p++) begin
        inflight[p] <= '0;
        keys[p]     <= '0;
      end
      for (int i = 0; i < BLOCKS; i++) begin
        perm[i]   <= (i % N_CORES == NODE_ID) ? P_M : P_I;
        cached[i] <= 1'b0;
        dirty[i]  <= 1'b0;
        mseed[i]  <= '0;
      end
    end else begin
      if (key_we) keys[pi(key_pid)] <= key_val;
      if (ld_we) begin
        menc[bi(ld_addr)]  <= ld_data;
        mseed[bi(ld_addr)] <= '0;
      end

      // generator bookkeeping
      if (kbo_start) begin
        kbo_fsm_q <= !pend_kb_start;
        kbo_idx_q <= kc_pend_idx;
      end
      if (kbi_start) kbi_fsm_q <= (st_q != N_MSG);
      if (kbi_done && !kbi_fsm_q) begin
        in_kb_q  <= kbi_kb;
        in_rdy_q <= 1'b1;
      end
      // seeds in flight: +1 per request sent, -1 per grant or refusal
      for (int p = 0; p < N_PROC; p++)
        inflight[p] <= inflight[p]
                       + CW'(refill_push && pi(refill_pid) == p)
                       - CW'(st_q == N_MSG && m_q.mtype == M_SEED_GRANT &&
                             pi(m_q.pid) == p && inflight[p] != '0);
      if (refill_push) begin
        tcm_rr_q <= (int'(tcm_rr_q) == N_TCM - 1) ? '0 : tcm_rr_q + 1'b1;
        ev.seed_req <= 1'b1;
      end

      case (st_q)
        N_IDLE: begin
          if (take_msg) begin
            m_q  <= msg_sel;
            st_q <= N_MSG;
          end else if (ev_try) begin
            res_q <= kc_ev_idx;
            pst_q <= PD_EV_ACK;
          end else if (take_cpu) begin
            op_q     <= cpu_op;
            opid_q   <= cpu_pid;
            oaddr_q  <= cpu_addr;
            owdata_q <= cpu_wdata;
            st_q     <= N_CPU;
          end
        end

        N_CPU: begin
          st_q <= N_IDLE;
          case (op_q)
            OP_RD: if (perm[oa] != P_I) begin
              if (cached[oa]) begin
                cpu_rdata    <= cdata[oa];
                cpu_done     <= 1'b1;
                ev.cache_hit <= 1'b1;
              end else begin
                load_for_fwd_q <= 1'b0;
                load_addr_q    <= oaddr_q;
                load_pid_q     <= opid_q;
                st_q           <= N_LOAD;
              end
            end else begin
              pst_q        <= PD_DATA;
              ev.miss_sent <= 1'b1;
            end
            OP_WR: if (perm[oa] == P_M) begin
              cdata[oa]    <= owdata_q;
              cached[oa]   <= 1'b1;
              dirty[oa]    <= 1'b1;
              cpu_done     <= 1'b1;
              ev.cache_hit <= 1'b1;
            end else begin
              pst_q        <= PD_DATA;
              ev.miss_sent <= 1'b1;
            end
            default: begin   // OP_EV
              if (cached[oa] && dirty[oa]) begin
                pst_q <= PD_EV_KB;
              end else begin
                cached[oa] <= 1'b0;
                cpu_done   <= 1'b1;
              end
            end
          endcase
        end

        N_MSG: begin
          st_q <= N_IDLE;
          case (m_q.mtype)
            M_USED_ACK: begin
              if (m_q.flag) begin
                menc[oa]        <= cdata[oa] ^ kc_lk_kb;   // entry found by its seed
                mseed[oa]       <= m_q.seed;
                cached[oa]      <= 1'b0;
                dirty[oa]       <= 1'b0;
                cpu_done        <= 1'b1;
                pst_q           <= PD_NONE;
                ev.evict_dirty  <= 1'b1;
              end else begin
                pst_q          <= PD_EV_KB;
                ev.evict_retry <= 1'b1;
              end
            end
            M_SEED_TO_REQ: begin
              if (kbi_busy) st_q <= N_MSG;     // wait for the generator
              else begin
                in_v_q    <= 1'b1;
                in_rdy_q  <= 1'b0;
                in_seed_q <= m_q.seed;
                in_pid_q  <= m_q.pid;
              end
            end
            M_DATA: begin
              late_q <= 1'b0;
              if (in_v_q && in_seed_q == m_q.seed && in_pid_q == m_q.pid) begin
                st_q <= N_DATA_W;
              end else begin
                ev.seed_mismatch <= 1'b1;
                st_q <= N_DATA_RK;
              end
            end
            M_UPG_ACK: begin
              perm[ma]    <= P_M;
              cdata[ma]   <= owdata_q;
              cached[ma]  <= 1'b1;
              dirty[ma]   <= 1'b1;
              cpu_done    <= 1'b1;
              pst_q       <= PD_NONE;
              ev.upgraded <= 1'b1;
            end
            M_INV: begin
              perm[ma]       <= P_I;
              cached[ma]     <= 1'b0;
              dirty[ma]      <= 1'b0;
              ev.invalidated <= 1'b1;
            end
            M_FWD: begin
              if (cached[ma]) begin
                clear_q <= cdata[ma];
                ev.fwd_cache_hit <= 1'b1;
                st_q <= N_FWD_KB;
              end else begin
                load_for_fwd_q <= 1'b1;
                load_addr_q    <= m_q.addr;
                load_pid_q     <= m_q.pid;
                ev.fwd_cache_miss <= 1'b1;
                st_q <= N_LOAD;
              end
            end
            default: ;
          endcase
        end

        N_LOAD: if (kbi_start) st_q <= N_LOAD_W;

        N_LOAD_W: if (kbi_done) begin
          if (load_for_fwd_q) begin
            clear_q <= menc[la] ^ kbi_kb;
            st_q    <= N_FWD_KB;
          end else begin
            cdata[la]   <= menc[la] ^ kbi_kb;
            cached[la]  <= 1'b1;
            dirty[la]   <= 1'b0;
            cpu_rdata   <= menc[la] ^ kbi_kb;
            cpu_done    <= 1'b1;
            ev.mem_load <= 1'b1;
            st_q        <= N_IDLE;
          end
        end

        N_FWD_KB: begin
          if (kc_lk_hit) begin
            if (kc_lk_ready) begin
              kb_q <= kc_lk_kb;
              ev.kb_pregen_hit <= 1'b1;
              st_q <= N_FWD_SEND;
            end
          end else if (kbo_start && !pend_kb_start) begin
            ev.kb_on_demand <= 1'b1;
            st_q <= N_FWD_OD;
          end
        end

        N_FWD_OD: if (kbo_done) begin
          kb_q <= kbo_kb;
          st_q <= N_FWD_SEND;
        end

        N_FWD_SEND: begin
          st_q <= N_IDLE;
          if (m_q.rw) begin
            perm[ma]   <= P_I;
            cached[ma] <= 1'b0;
            dirty[ma]  <= 1'b0;
          end else begin
            perm[ma] <= P_S;
          end
        end

        N_DATA_RK: if (kbi_start) begin
          in_seed_q <= m_q.seed;
          in_pid_q  <= m_q.pid;
          in_rdy_q  <= 1'b0;
          in_v_q    <= 1'b1;
          late_q    <= 1'b1;
          st_q      <= N_DATA_W;
        end

        N_DATA_W: begin
          if (in_rdy_q || (kbi_done && kbi_fsm_q)) begin
            kb_q <= in_rdy_q ? in_kb_q : kbi_kb;
            st_q <= N_DATA_FIN;
          end else begin
            late_q <= 1'b1;
          end
        end

        N_DATA_FIN: begin
          st_q      <= N_IDLE;
          in_v_q    <= 1'b0;
          in_rdy_q  <= 1'b0;
          pst_q     <= PD_NONE;
          cpu_done  <= 1'b1;
          menc[ma]  <= m_q.data;
          mseed[ma] <= m_q.seed;
          perm[ma]  <= m_q.rw ? P_M : P_S;
          cached[ma] <= 1'b1;
          if (late_q) ev.kb_late <= 1'b1;
          else        ev.kb_hidden <= 1'b1;
          if (op_q == OP_WR) begin
            cdata[ma] <= owdata_q;
            dirty[ma] <= 1'b1;
          end else begin
            cdata[ma] <= m_q.data ^ kb_q;
            dirty[ma] <= 1'b0;
            cpu_rdata <= m_q.data ^ kb_q;
          end
        end

        default: st_q <= N_IDLE;
      endcase
    end
  end

  // the TCM names only seeds it granted to this core, or flags them fresh
  assert property (@(posedge clk) disable iff (!rst_n)
                   st_q == N_FWD_KB && !m_q.flag |-> kc_lk_hit)
    else $error("forwarded seed is not an outstanding seed of this core");
  assert property (@(posedge clk) disable iff (!rst_n) kc_alloc |-> !kc_full);
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready |-> int'(in_msg.dst) == NODE_ID);
  assert property (@(posedge clk) disable iff (!rst_n)
                   din_valid && din_ready |-> int'(din_msg.dst) == NODE_ID);
  // every push was checked for room when the work was accepted
  assert property (@(posedge clk) disable iff (!rst_n) q_in_valid |-> q_in_ready);
  assert property (@(posedge clk) disable iff (!rst_n) dq_in_valid |-> dq_in_ready);
endmodule
