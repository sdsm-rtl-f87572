// Shared body of the system testbenches (tb_sdsm_top, tb_sdsm_top32).
// The including module defines N_CORES, N_TCM, N_PROC, BLOCKS, NET_LATENCY,
// N_RANDOM, WATCHDOG, instantiates `dut` (sdsm_top) on the signals below and
// calls $finish once `run_over` is set (after the result line is printed).
//
// Setup: every process has one key shared by all cores; block a belongs to
// process (a/4)%2, starts at core a % N_CORES and is loaded there encrypted
// with its initial, address-based KB (computed by the reference model).
// Process 1 is disabled on the owner of block FB so that requests for FB
// find no pre-generated KB there.
// Then a directed sequence makes each mechanism happen, followed by random
// reads, writes and evictions checked against a shadow copy of the data.
// A monitor on the interconnect checks that no block crosses it as
// cleartext and that no (process, seed) pair encrypts two transfers.

  import sdsm_pkg::*;
  import sdsm_ref_pkg::*;

  localparam int FB = 6;                 // block of process 1
  localparam int FB_OWNER = FB % N_CORES;
  localparam int N_ACT = (N_CORES < 8) ? N_CORES : 8;   // cores used randomly

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              key_we;
  node_id_t          key_core;
  pid_t              key_pid;
  aes_blk_t          key_val;
  logic [N_PROC-1:0] proc_en [N_CORES];
  logic              ld_we;
  node_id_t          ld_core;
  baddr_t            ld_addr;
  block_t            ld_data;
  logic [N_CORES-1:0] cpu_valid, cpu_ready, cpu_done;
  cpu_op_e           cpu_op    [N_CORES];
  pid_t              cpu_pid   [N_CORES];
  baddr_t            cpu_addr  [N_CORES];
  block_t            cpu_wdata [N_CORES];
  block_t            cpu_rdata [N_CORES];
  node_ev_t          node_ev   [N_CORES];
  logic [N_TCM-1:0]  tcm_fwd_pregen, tcm_fwd_fresh, tcm_inv, tcm_used_fail;

  int checks = 0, failures = 0;
  block_t shadow [BLOCKS];

  // mechanism counters
  int n_cache_hit, n_mem_load, n_miss, n_hidden, n_late, n_fwd_hit, n_fwd_miss,
      n_pregen, n_ondemand, n_evict, n_inv, n_upg, n_seedreq, n_tcm_pregen,
      n_tcm_fresh, n_tcm_inv, n_data_msgs;

  function automatic aes_blk_t key_of(int p);
    return {32'h5d5d0000 + p, 32'h01234567, 32'h89abcdef ^ p, 32'h0badcafe};
  endfunction
  function automatic int pid_of(int a);
    return (a / 4) % 2;
  endfunction
  function automatic block_t plain_of(int a);
    block_t b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = 32'hc0de0000 + 32'(a * 16 + i);
    return b;
  endfunction

  bit run_over = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    run_over = 1'b1;
  end

  // event counting and interconnect monitor
  bit seen_seed [string];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N_CORES; c++) begin
      n_cache_hit += int'(node_ev[c].cache_hit);
      n_mem_load  += int'(node_ev[c].mem_load);
      n_miss      += int'(node_ev[c].miss_sent);
      n_hidden    += int'(node_ev[c].kb_hidden);
      n_late      += int'(node_ev[c].kb_late);
      n_fwd_hit   += int'(node_ev[c].fwd_cache_hit);
      n_fwd_miss  += int'(node_ev[c].fwd_cache_miss);
      n_pregen    += int'(node_ev[c].kb_pregen_hit);
      n_ondemand  += int'(node_ev[c].kb_on_demand);
      n_evict     += int'(node_ev[c].evict_dirty);
      n_inv       += int'(node_ev[c].invalidated);
      n_upg       += int'(node_ev[c].upgraded);
      n_seedreq   += int'(node_ev[c].seed_req);
    end
    for (int t = 0; t < N_TCM; t++) begin
      n_tcm_pregen += int'(tcm_fwd_pregen[t]);
      n_tcm_fresh  += int'(tcm_fwd_fresh[t]);
      n_tcm_inv    += int'(tcm_inv[t]);
    end
    if ((dut.d_out_valid & dut.d_out_ready) != '0 && dut.d_out_msg.mtype == M_DATA) begin
      string k;
      n_data_msgs++;
      k = $sformatf("%0d/%0h", dut.d_out_msg.pid, dut.d_out_msg.seed);
      checks++;
      if (seen_seed.exists(k) || dut.d_out_msg.seed == '0) begin
        failures++;
        $display("FAIL: seed %s used for a second transfer", k);
      end
      seen_seed[k] = 1;
      checks++;
      if (dut.d_out_msg.data == shadow[int'(dut.d_out_msg.addr) % BLOCKS]) begin
        failures++;
        $display("FAIL: block %0d crossed the interconnect in clear", dut.d_out_msg.addr);
      end
    end
  end

  // one core operation; returns read data and latency in cycles
  task automatic cpu(int c, cpu_op_e o, int a, block_t wd, output block_t rd, output int lat);
    cpu_op[c] = o; cpu_pid[c] = pid_t'(pid_of(a)); cpu_addr[c] = baddr_t'(a);
    cpu_wdata[c] = wd;
    lat = 0;
    // offer the operation from a falling edge; it is taken at the next
    // rising edge if the node shows ready
    forever begin
      @(negedge clk);
      cpu_valid[c] = 1'b1;
      #1;
      if (cpu_ready[c]) break;
      cpu_valid[c] = 1'b0;
    end
    @(posedge clk); #1 cpu_valid[c] = 1'b0;
    forever begin
      @(negedge clk);
      lat++;
      if (cpu_done[c]) break;
    end
    rd = cpu_rdata[c];
    @(posedge clk); #1;   // event counters have caught up
  endtask

  task automatic rd_check(int c, int a, string what, output int lat);
    block_t r;
    cpu(c, OP_RD, a, '0, r, lat);
    check(r == shadow[a], $sformatf("%s: core %0d block %0d read %h expected %h",
                                    what, c, a, r[31:0], shadow[a][31:0]));
  endtask

  task automatic wr(int c, int a, block_t v);
    block_t r; int lat;
    cpu(c, OP_WR, a, v, r, lat);
    shadow[a] = v;
  endtask

  task automatic evict(int c, int a);
    block_t r; int lat;
    cpu(c, OP_EV, a, '0, r, lat);
  endtask

  function automatic block_t rnd_block();
    block_t b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
    return b;
  endfunction

  int lat, base;
  initial begin
    key_we = 0; ld_we = 0; key_core = '0; key_pid = '0; key_val = '0;
    ld_core = '0; ld_addr = '0; ld_data = '0;
    cpu_valid = '0;
    for (int c = 0; c < N_CORES; c++) begin
      proc_en[c] = '0; cpu_op[c] = OP_RD; cpu_pid[c] = '0; cpu_addr[c] = '0;
      cpu_wdata[c] = '0;
    end
    for (int a = 0; a < BLOCKS; a++) shadow[a] = plain_of(a);
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    // keys of processes 0 and 1 into every core
    for (int c = 0; c < N_CORES; c++)
      for (int p = 0; p < 2; p++) begin
        key_we = 1; key_core = node_id_t'(c); key_pid = pid_t'(p); key_val = key_of(p);
        @(posedge clk); #1;
      end
    key_we = 0;
    // initial encrypted image, at each block's first owner
    for (int a = 0; a < BLOCKS; a++) begin
      ld_we = 1; ld_core = node_id_t'(a % N_CORES); ld_addr = baddr_t'(a);
      ld_data = plain_of(a) ^ ref_kb(64'd0, 16'(a), key_of(pid_of(a)));
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int c = 0; c < N_CORES; c++) proc_en[c] = (c == FB_OWNER) ? 4'b0001 : 4'b0011;
    // let the cores fill their outstanding KB caches
    repeat (N_CORES * 40 + 4 * NET_LATENCY + 200) @(posedge clk);

    // 1. remote read, owner has the block only in memory (sender miss)
    base = n_fwd_miss;
    rd_check(1, 0, "remote read, sender miss", lat);
    check(n_fwd_miss == base + 1, "sender loaded the block from memory");
    check(lat <= 3 * NET_LATENCY + 80, $sformatf("sender-miss read latency %0d", lat));
    $display("remote read (sender miss) latency: %0d cycles", lat);
    // 2. local read from memory, then a cache hit
    rd_check(0, 0, "local read from memory", lat);
    base = n_cache_hit;
    rd_check(0, 0, "local cache hit", lat);
    check(n_cache_hit == base + 1 && lat <= 3, $sformatf("cache hit, %0d cycles", lat));
    // 3. remote read, owner has it in cache (sender hit)
    base = n_fwd_hit;
    rd_check(2, 0, "remote read, sender hit", lat);
    check(n_fwd_hit == base + 1, "sender served from its cache");
    check(lat <= 3 * NET_LATENCY + 40, $sformatf("sender-hit read latency %0d", lat));
    $display("remote read (sender hit) latency: %0d cycles", lat);
    // 4. write by another core invalidates the two readers
    base = n_inv;
    wr(3, 0, rnd_block());
    repeat (2 * NET_LATENCY) @(posedge clk);
    check(n_inv == base + 2, $sformatf("invalidations %0d expected 2", n_inv - base));
    rd_check(1, 0, "read after remote write", lat);
    // 5. modified block evicted with an outstanding KB, then fetched back
    base = n_evict;
    evict(3, 0);
    check(n_evict == base + 1, "dirty eviction used an outstanding KB");
    rd_check(2, 0, "read of an evicted modified block", lat);
    // 6. owner (now sharer) writes: upgrade without data
    base = n_upg;
    wr(3, 0, rnd_block());
    check(n_upg == base + 1, "write permission granted without data");
    rd_check(0, 0, "read after upgrade", lat);
    // 7. request to a core with no KB for the process: computed on demand
    base = n_ondemand;
    rd_check((FB_OWNER + 1) % N_CORES, FB, "read with on-demand KB", lat);
    check(n_ondemand == base + 1, "sender computed the KB on demand");
    $display("remote read (on-demand KB) latency: %0d cycles", lat);

    // random traffic
    for (int i = 0; i < N_RANDOM; i++) begin
      int c, a, k;
      c = $urandom_range(N_ACT - 1);
      a = $urandom_range(BLOCKS - 1);
      k = $urandom_range(9);
      if (k < 5)      rd_check(c, a, "random read", lat);
      else if (k < 8) wr(c, a, rnd_block());
      else            evict(c, a);
    end
    // everything readable at the end
    for (int a = 0; a < BLOCKS; a++) rd_check(a % N_ACT, a, "final read", lat);

    $display("events: cache_hit=%0d mem_load=%0d miss=%0d kb_hidden=%0d kb_late=%0d fwd_hit=%0d fwd_miss=%0d pregen=%0d on_demand=%0d evict=%0d inv=%0d upgrade=%0d seed_req=%0d tcm_pregen=%0d tcm_fresh=%0d tcm_inv=%0d data_msgs=%0d",
             n_cache_hit, n_mem_load, n_miss, n_hidden, n_late, n_fwd_hit, n_fwd_miss,
             n_pregen, n_ondemand, n_evict, n_inv, n_upg, n_seedreq, n_tcm_pregen,
             n_tcm_fresh, n_tcm_inv, n_data_msgs);
    check(n_cache_hit > 0,  "mechanism: cache hit");
    check(n_mem_load > 0,   "mechanism: decrypt from local memory");
    check(n_hidden > 0,     "mechanism: incoming KB ready before data");
    check(n_fwd_hit > 0,    "mechanism: sender cache hit (Fig. 2a)");
    check(n_fwd_miss > 0,   "mechanism: sender cache miss (Fig. 2b)");
    check(n_pregen > 0,     "mechanism: pre-generated KB used");
    check(n_ondemand > 0,   "mechanism: KB computed on demand");
    check(n_evict > 0,      "mechanism: modified block evicted");
    check(n_inv > 0,        "mechanism: invalidation");
    check(n_upg > 0,        "mechanism: upgrade");
    check(n_seedreq > 0,    "mechanism: seed requests");
    check(n_tcm_pregen + n_tcm_fresh == n_miss - n_upg,
          "every data request got exactly one seed from the TCM");
    check(n_late == 0,      "incoming KB never late at this latency");
    check(n_data_msgs == n_miss - n_upg, "one data transfer per request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    run_over = 1'b1;
  end
