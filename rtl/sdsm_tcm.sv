// sdsm_tcm -- trusted coherence manager: a directory that lives inside the
// trusted area and also manages encryption seeds.
//
// Directory: for each block of its share of the address space (block a
// belongs to TCM a % N_TCM) it keeps an owner core, which always holds a
// current copy, and the set of sharers. Blocks start owned, with write
// permission, by core a % N_CORES.
// Seeds: a per-process write counter (sdsm_seed_counter) produces unique
// seeds; the TCM grants them to senders on request and remembers each
// sender's outstanding seeds, oldest first (sdsm_seed_store).
// Miss handling (one message at a time, in arrival order):
//   REQ_RD/REQ_WR from r for block a of process p, owner o:
//     * take o's oldest outstanding seed for p (or, if o has none, a fresh
//       counter value, flagged so o computes the KB on demand);
//     * send SEED_TO_REQ(seed) to r first, so r can compute its decryption
//       KB while the request travels to o and the data comes back;
//     * send FWD(seed, r) to o;
//     * for a write, invalidate every other sharer and make r the owner;
//       a write by the owner itself only needs UPG_ACK plus invalidations.
//   SEED_REQ: grant one new seed (refused if o's queue for p is full).
//   SEED_USED: withdraw a seed the sender wants for a local eviction;
//     USED_ACK tells it whether the seed was still unassigned.
// It emits at most one message per cycle into a small output queue.
// Following the design: the trusted directory, the seed counter per
// process, seeds granted at the sender's request and kept in the TCM,
// oldest seed sent straight to the requestor and suggested to the owner.
// This implementation's choices: the message set, the "fresh seed" fallback,
// SEED_USED withdrawal, no transient states (one outstanding transaction per
// block is assumed) and invalidations without acknowledgements (the network
// is in order).
module sdsm_tcm
  import sdsm_pkg::*;
#(
  parameter int N_CORES    = 256,
  parameter int N_TCM      = 1,
  parameter int TCM_ID     = 0,
  parameter int N_PROC     = 4,
  parameter int BLOCKS     = 32,
  parameter int SEED_DEPTH = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  msg_t  in_msg,
  output logic  out_valid,
  input  logic  out_ready,
  output msg_t  out_msg,
  // event pulses for observation
  output logic  ev_fwd_pregen,   // request served with a pre-granted seed
  output logic  ev_fwd_fresh,    // owner had no outstanding seed
  output logic  ev_inv,          // invalidation sent
  output logic  ev_used_fail     // seed withdrawal refused
);
  localparam int DIR_N  = (BLOCKS + N_TCM - 1) / N_TCM;
  localparam int SELF   = N_CORES + TCM_ID;
  localparam int CIW    = $clog2(N_CORES);

  typedef enum logic [2:0] {T_IDLE, T_EXEC, T_FWD, T_INV} tst_e;
  tst_e st_q;

  node_id_t           owner [DIR_N];
  logic [N_CORES-1:0] sh    [DIR_N];

  msg_t               m_q;
  seed_t              s_q;
  logic               fresh_q;
  node_id_t           o_q;
  logic [N_CORES-1:0] inv_q;

  // output queue
  logic q_in_valid, q_in_ready;
  msg_t q_in;
  logic [$clog2(5)-1:0] q_free;
  sdsm_fifo #(.T(msg_t), .DEPTH(4)) u_outq (
    .clk, .rst_n,
    .in_valid (q_in_valid), .in_ready (q_in_ready), .in_data (q_in),
    .out_valid, .out_ready, .out_data (out_msg), .free (q_free)
  );

  // seed counter and store
  logic  ctr_take;
  seed_t ctr_seed;
  logic [N_PROC-1:0] ctr_exh;
  sdsm_seed_counter #(.N_PROC(N_PROC), .TCM_ID(TCM_ID)) u_ctr (
    .clk, .rst_n, .pid (m_q.pid), .take (ctr_take), .seed (ctr_seed),
    .exhausted (ctr_exh)
  );

  logic [1:0] ss_op;
  node_id_t   ss_core;
  seed_t      ss_seed;     // value pushed, or seed to withdraw
  logic       ss_head_v, ss_full, ss_found;
  seed_t      ss_head;
  logic [$clog2(SEED_DEPTH+1)-1:0] ss_cnt;
  sdsm_seed_store #(.N_CORES(N_CORES), .N_PROC(N_PROC), .DEPTH(SEED_DEPTH)) u_store (
    .clk, .rst_n, .op (ss_op), .core (ss_core), .pid (m_q.pid), .seed (ss_seed),
    .head_valid (ss_head_v), .head_seed (ss_head), .full (ss_full),
    .found (ss_found), .count (ss_cnt)
  );

  int                 li;        // directory index of m_q.addr
  node_id_t           cur_owner;
  logic               is_req, is_upg;
  logic [N_CORES-1:0] src_bit, own_bit;
  logic [CIW-1:0]     inv_first;

  function automatic msg_t mk(msg_type_e t, node_id_t dst);
    msg_t m;
    m       = '0;
    m.mtype = t;
    m.src   = node_id_t'(SELF);
    m.dst   = dst;
    m.pid   = m_q.pid;
    m.addr  = m_q.addr;
    return m;
  endfunction

  always_comb begin
    li        = (int'(m_q.addr) / N_TCM) % DIR_N;
    cur_owner = owner[li];
    is_req    = (m_q.mtype == M_REQ_RD) || (m_q.mtype == M_REQ_WR);
    is_upg    = (m_q.mtype == M_REQ_WR) && (cur_owner == m_q.src);
    src_bit   = '0;
    own_bit   = '0;
    src_bit[int'(m_q.src) % N_CORES]   = 1'b1;
    own_bit[int'(cur_owner) % N_CORES] = 1'b1;
    inv_first = '0;
    for (int i = N_CORES - 1; i >= 0; i--) if (inv_q[i]) inv_first = CIW'(i);
    ss_core   = is_req ? cur_owner : m_q.src;
    ss_seed   = (m_q.mtype == M_SEED_REQ) ? ctr_seed : m_q.seed;
  end

  always_comb begin

    in_ready   = (st_q == T_IDLE);
    q_in_valid = 1'b0;
    q_in       = '0;
    ctr_take   = 1'b0;
    ss_op      = 2'd0;
    ev_fwd_pregen = 1'b0;
    ev_fwd_fresh  = 1'b0;
    ev_inv        = 1'b0;
    ev_used_fail  = 1'b0;

    case (st_q)
      T_EXEC: if (q_in_ready) begin
        q_in_valid = 1'b1;
        case (m_q.mtype)
          M_SEED_REQ: begin
            q_in      = mk(M_SEED_GRANT, m_q.src);
            q_in.flag = !ss_full && !ctr_exh[int'(m_q.pid) % N_PROC];
            q_in.seed = ctr_seed;
            if (q_in.flag) begin
              ctr_take = 1'b1;
              ss_op    = 2'd1;           // push
            end
          end
          M_SEED_USED: begin
            q_in      = mk(M_USED_ACK, m_q.src);
            q_in.seed = m_q.seed;
            q_in.flag = ss_found;
            ss_op     = 2'd3;            // remove
            ev_used_fail = !ss_found;
          end
          M_REQ_RD, M_REQ_WR: begin
            if (is_upg) begin
              q_in    = mk(M_UPG_ACK, m_q.src);
              q_in.rw = 1'b1;
            end else begin
              q_in    = mk(M_SEED_TO_REQ, m_q.src);
              q_in.rw = (m_q.mtype == M_REQ_WR);
              if (ss_head_v) begin
                q_in.seed     = ss_head;
                ss_op         = 2'd2;    // pop
                ev_fwd_pregen = 1'b1;
              end else begin
                q_in.seed    = ctr_seed;
                ctr_take     = 1'b1;
                ev_fwd_fresh = 1'b1;
              end
            end
          end
          default: q_in_valid = 1'b0;    // not addressed to a TCM: dropped
        endcase
      end
      T_FWD: begin
        q_in_valid = 1'b1;
        q_in       = mk(M_FWD, o_q);
        q_in.req   = m_q.src;
        q_in.seed  = s_q;
        q_in.flag  = fresh_q;
        q_in.rw    = (m_q.mtype == M_REQ_WR);
      end
      T_INV: if (inv_q != '0) begin
        q_in_valid = 1'b1;
        q_in       = mk(M_INV, node_id_t'(inv_first));
        ev_inv     = q_in_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q    <= T_IDLE;
      m_q     <= '0;
      s_q     <= '0;
      fresh_q <= 1'b0;
      o_q     <= '0;
      inv_q   <= '0;
      for (int i = 0; i < DIR_N; i++) begin
        owner[i] <= node_id_t'((i * N_TCM + TCM_ID) % N_CORES);
        sh[i]    <= '0;
        sh[i][(i * N_TCM + TCM_ID) % N_CORES] <= 1'b1;
      end
    end else begin
      case (st_q)
        T_IDLE: if (in_valid) begin
          m_q  <= in_msg;
          st_q <= T_EXEC;
        end
        T_EXEC: if (q_in_ready) begin
          st_q <= T_IDLE;
          if (is_req) begin
            o_q     <= cur_owner;
            s_q     <= ss_head_v ? ss_head : ctr_seed;
            fresh_q <= !ss_head_v;
            if (m_q.mtype == M_REQ_WR) begin
              inv_q     <= sh[li] & ~src_bit & ~own_bit;
              owner[li] <= m_q.src;
              sh[li]    <= src_bit;
            end else begin
              inv_q  <= '0;
              sh[li] <= sh[li] | src_bit;
            end
            st_q <= is_upg ? T_INV : T_FWD;
          end
        end
        T_FWD: if (q_in_ready) st_q <= T_INV;
        T_INV: begin
          if (inv_q == '0) st_q <= T_IDLE;
          else if (q_in_ready) inv_q[inv_first] <= 1'b0;
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  // a TCM only ever receives messages addressed to it
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready |-> int'(in_msg.dst) == SELF);
endmodule
