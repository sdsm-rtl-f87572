// sdsm_top -- a secure directory-based distributed shared memory: N_CORES
// secure cores (sdsm_node) and N_TCM trusted coherence managers (sdsm_tcm)
// on an untrusted interconnect made of three virtual networks (sdsm_network
// each): requests, TCM control, and data. Separating the message classes
// keeps a channel full of requests from blocking the replies that drain it.
//
// Each core's private memory holds blocks encrypted in counter mode; blocks
// move between cores only encrypted. A miss goes to the block's home TCM
// (block a -> TCM a % N_TCM), which sends the owner's oldest outstanding
// seed straight to the requestor and forwards the request, naming that seed,
// to the owner. The requestor computes its KB while the request travels;
// the owner encrypts with the KB it pre-computed for that seed. The owner
// side is therefore a plain XOR and the requestor's KB is normally ready
// before the data arrives.
//
// Ports: the per-core CPU ports (the cores themselves are outside this
// design), shared setup buses that load a core's process keys and its
// initial encrypted memory image, and per-core / per-TCM event pulses.
// Endpoint ids on the interconnect: cores 0..N_CORES-1, TCMs after them.
// Sizes: 10 outstanding KBs per core, 10 outstanding seeds per core and
// process in the TCM, 8-byte seeds and a 100-cycle interconnect latency
// follow the design's evaluation; 256 cores is one of its evaluated system
// sizes. The TCM count, process count and memory size are this
// implementation's choices.
module sdsm_top
  import sdsm_pkg::*;
#(
  parameter int N_CORES     = 256,
  parameter int N_TCM       = 1,
  parameter int N_PROC      = 4,
  parameter int BLOCKS      = 32,
  parameter int KB_ENTRIES  = 10,
  parameter int SEED_DEPTH  = 10,
  parameter int NET_LATENCY = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  // setup (one core at a time)
  input  logic              key_we,
  input  node_id_t          key_core,
  input  pid_t              key_pid,
  input  aes_blk_t          key_val,
  input  logic [N_PROC-1:0] proc_en [N_CORES],
  input  logic              ld_we,
  input  node_id_t          ld_core,
  input  baddr_t            ld_addr,
  input  block_t            ld_data,
  // core side, one port per core
  input  logic [N_CORES-1:0] cpu_valid,
  output logic [N_CORES-1:0] cpu_ready,
  input  cpu_op_e           cpu_op    [N_CORES],
  input  pid_t              cpu_pid   [N_CORES],
  input  baddr_t            cpu_addr  [N_CORES],
  input  block_t            cpu_wdata [N_CORES],
  output logic [N_CORES-1:0] cpu_done,
  output block_t            cpu_rdata [N_CORES],
  // observation
  output node_ev_t          node_ev   [N_CORES],
  output logic [N_TCM-1:0]  tcm_fwd_pregen,
  output logic [N_TCM-1:0]  tcm_fwd_fresh,
  output logic [N_TCM-1:0]  tcm_inv,
  output logic [N_TCM-1:0]  tcm_used_fail
);
  localparam int N_EP = N_CORES + N_TCM;

  // Three virtual networks on the same kind of in-order channel, so that a
  // full channel never holds back the messages that would drain it:
  //   A: requests, cores -> TCMs (REQ_RD/REQ_WR, SEED_REQ, SEED_USED)
  //   B: control,  TCMs -> cores (SEED_GRANT, USED_ACK, FWD, INV, UPG_ACK)
  //   D: data,     cores -> cores (DATA) and the TCM's SEED_TO_REQ, which
  //      enters D before the forward it belongs to and so stays ahead of
  //      the DATA that answers it.
  logic [N_EP-1:0] a_in_valid, a_in_ready, a_out_valid, a_out_ready;
  logic [N_EP-1:0] b_in_valid, b_in_ready, b_out_valid, b_out_ready;
  logic [N_EP-1:0] d_in_valid, d_in_ready, d_out_valid, d_out_ready;
  msg_t            a_in_msg [N_EP];
  msg_t            b_in_msg [N_EP];
  msg_t            d_in_msg [N_EP];
  msg_t            a_out_msg, b_out_msg, d_out_msg;

  sdsm_network #(.N_EP(N_EP), .LATENCY(NET_LATENCY)) u_net_a (
    .clk, .rst_n,
    .in_valid (a_in_valid), .in_msg (a_in_msg), .in_ready (a_in_ready),
    .out_valid (a_out_valid), .out_msg (a_out_msg), .out_ready (a_out_ready)
  );
  sdsm_network #(.N_EP(N_EP), .LATENCY(NET_LATENCY)) u_net_b (
    .clk, .rst_n,
    .in_valid (b_in_valid), .in_msg (b_in_msg), .in_ready (b_in_ready),
    .out_valid (b_out_valid), .out_msg (b_out_msg), .out_ready (b_out_ready)
  );
  sdsm_network #(.N_EP(N_EP), .LATENCY(NET_LATENCY)) u_net_d (
    .clk, .rst_n,
    .in_valid (d_in_valid), .in_msg (d_in_msg), .in_ready (d_in_ready),
    .out_valid (d_out_valid), .out_msg (d_out_msg), .out_ready (d_out_ready)
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    sdsm_node #(
      .NODE_ID (c), .N_CORES (N_CORES), .N_TCM (N_TCM), .N_PROC (N_PROC),
      .BLOCKS (BLOCKS), .KB_ENTRIES (KB_ENTRIES)
    ) u_node (
      .clk, .rst_n,
      .key_we    (key_we && int'(key_core) == c),
      .key_pid, .key_val,
      .proc_en   (proc_en[c]),
      .ld_we     (ld_we && int'(ld_core) == c),
      .ld_addr, .ld_data,
      .cpu_valid (cpu_valid[c]), .cpu_ready (cpu_ready[c]), .cpu_op (cpu_op[c]),
      .cpu_pid   (cpu_pid[c]), .cpu_addr (cpu_addr[c]), .cpu_wdata (cpu_wdata[c]),
      .cpu_done  (cpu_done[c]), .cpu_rdata (cpu_rdata[c]),
      .in_valid  (b_out_valid[c]), .in_ready (b_out_ready[c]), .in_msg (b_out_msg),
      .out_valid (a_in_valid[c]), .out_ready (a_in_ready[c]), .out_msg (a_in_msg[c]),
      .din_valid (d_out_valid[c]), .din_ready (d_out_ready[c]), .din_msg (d_out_msg),
      .dout_valid (d_in_valid[c]), .dout_ready (d_in_ready[c]), .dout_msg (d_in_msg[c]),
      .ev        (node_ev[c])
    );
    // cores send nothing on B and receive nothing on A
    assign b_in_valid[c]  = 1'b0;
    assign b_in_msg[c]    = '0;
    assign a_out_ready[c] = 1'b1;
  end

  for (genvar t = 0; t < N_TCM; t++) begin : g_tcm
    logic tcm_out_valid, tcm_out_ready, to_d;
    msg_t tcm_out_msg;
    sdsm_tcm #(
      .N_CORES (N_CORES), .N_TCM (N_TCM), .TCM_ID (t), .N_PROC (N_PROC),
      .BLOCKS (BLOCKS), .SEED_DEPTH (SEED_DEPTH)
    ) u_tcm (
      .clk, .rst_n,
      .in_valid  (a_out_valid[N_CORES + t]), .in_ready (a_out_ready[N_CORES + t]),
      .in_msg    (a_out_msg),
      .out_valid (tcm_out_valid), .out_ready (tcm_out_ready),
      .out_msg   (tcm_out_msg),
      .ev_fwd_pregen (tcm_fwd_pregen[t]), .ev_fwd_fresh (tcm_fwd_fresh[t]),
      .ev_inv        (tcm_inv[t]),        .ev_used_fail (tcm_used_fail[t])
    );
    assign to_d                   = (tcm_out_msg.mtype == M_SEED_TO_REQ);
    assign b_in_valid[N_CORES + t] = tcm_out_valid && !to_d;
    assign d_in_valid[N_CORES + t] = tcm_out_valid && to_d;
    assign b_in_msg[N_CORES + t]   = tcm_out_msg;
    assign d_in_msg[N_CORES + t]   = tcm_out_msg;
    assign tcm_out_ready           = to_d ? d_in_ready[N_CORES + t] : b_in_ready[N_CORES + t];
    // TCMs send nothing on A and receive nothing on B or D
    assign a_in_valid[N_CORES + t]  = 1'b0;
    assign a_in_msg[N_CORES + t]    = '0;
    assign b_out_ready[N_CORES + t] = 1'b1;
    assign d_out_ready[N_CORES + t] = 1'b1;
  end
endmodule
