// tb_sdsm_node -- one secure core against a scripted TCM and peers. Checks,
// with keystream blocks from the reference model: pre-generation (seed
// requests and KB computation up to the cache size), sending a block from
// memory (decrypt with its stored seed, re-encrypt with the forwarded
// seed's KB) and from the cache, local decryption into the cache, a remote
// miss with the incoming KB ready before the data, an upgrade, a dirty
// eviction through seed withdrawal (refused once, then granted), a fresh
// seed computed on demand, invalidation, and a data/seed mismatch.
module tb_sdsm_node;
  import sdsm_pkg::*;
  import sdsm_ref_pkg::*;
  localparam int NC = 4, NB = 8, NP = 4, KE = 10, TCM = NC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic key_we; pid_t key_pid; aes_blk_t key_val; logic [NP-1:0] proc_en;
  logic ld_we; baddr_t ld_addr; block_t ld_data;
  logic cpu_valid, cpu_ready, cpu_done; cpu_op_e cpu_op; pid_t cpu_pid;
  baddr_t cpu_addr; block_t cpu_wdata, cpu_rdata;
  logic in_valid, in_ready, out_valid, out_ready;
  logic din_valid, din_ready, dout_valid, dout_ready;
  msg_t in_msg, out_msg, din_msg, dout_msg;
  node_ev_t ev;
  int checks = 0, failures = 0;

  sdsm_node #(.NODE_ID(0), .N_CORES(NC), .N_TCM(1), .N_PROC(NP), .BLOCKS(NB),
              .KB_ENTRIES(KE)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic aes_blk_t key_of(int p);
    return {32'h11110000 + p, 32'h22223333, 32'h44445555 ^ p, 32'h66667777};
  endfunction
  function automatic block_t plain_of(int a);
    return {16{32'hab000000 + 32'(a)}};
  endfunction

  // scripted peers: messages to the node, messages from it
  msg_t tx [$];
  msg_t got [$];
  seed_t granted [NP][$];
  int   n_seed_req = 0, next_seed = 100;
  int   cyc = 0;
  int   n_ev [string];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if ((in_valid && in_ready) || (din_valid && din_ready)) void'(tx.pop_front());
    if (dout_valid && dout_ready) got.push_back(dout_msg);
    if (out_valid && out_ready) begin
      if (out_msg.mtype == M_SEED_REQ) begin
        msg_t g;
        n_seed_req++;
        g = '0; g.mtype = M_SEED_GRANT; g.src = TCM; g.dst = 0; g.pid = out_msg.pid;
        g.seed = 64'(next_seed++); g.flag = 1;
        granted[int'(out_msg.pid)].push_back(g.seed);
        tx.push_back(g);
      end else got.push_back(out_msg);
    end
    if (ev.kb_hidden)      n_ev["hidden"]++;
    if (ev.kb_late)        n_ev["late"]++;
    if (ev.seed_mismatch)  n_ev["mismatch"]++;
    if (ev.fwd_cache_hit)  n_ev["fwd_hit"]++;
    if (ev.fwd_cache_miss) n_ev["fwd_miss"]++;
    if (ev.kb_pregen_hit)  n_ev["pregen"]++;
    if (ev.kb_on_demand)   n_ev["on_demand"]++;
    if (ev.evict_dirty)    n_ev["evict"]++;
    if (ev.evict_retry)    n_ev["retry"]++;
    if (ev.upgraded)       n_ev["upgrade"]++;
    if (ev.invalidated)    n_ev["inv"]++;
    if (ev.mem_load)       n_ev["mem_load"]++;
    if (ev.cache_hit)      n_ev["hit"]++;
  end
  // the head message goes to the data port (DATA, SEED_TO_REQ) or the
  // control port, so the scripted order is kept across both
  always_comb begin
    logic d;
    d         = (tx.size() > 0) && (tx[0].mtype == M_DATA || tx[0].mtype == M_SEED_TO_REQ);
    in_valid  = (tx.size() > 0) && !d;
    din_valid = d;
    in_msg    = (tx.size() > 0) ? tx[0] : '0;
    din_msg   = in_msg;
  end

  function automatic msg_t mk(msg_type_e t, int src, int pid, int a, seed_t s);
    msg_t m;
    m = '0; m.mtype = t; m.src = node_id_t'(src); m.dst = 0; m.pid = pid_t'(pid);
    m.addr = baddr_t'(a); m.seed = s;
    return m;
  endfunction

  task automatic wait_msg(output msg_t m, output int at);
    while (got.size() == 0) @(posedge clk);
    m = got.pop_front();
    at = cyc;
    #1;
  endtask

  task automatic cpu(cpu_op_e o, int pid, int a, block_t wd);
    cpu_op = o; cpu_pid = pid_t'(pid); cpu_addr = baddr_t'(a); cpu_wdata = wd;
    forever begin
      @(negedge clk); cpu_valid = 1; #1;
      if (cpu_ready) break;
      cpu_valid = 0;
    end
    @(posedge clk); #1 cpu_valid = 0;
  endtask

  task automatic cpu_wait(output block_t rd);
    forever begin @(negedge clk); if (cpu_done) break; end
    rd = cpu_rdata;
    @(posedge clk); #1;   // event counters have caught up
  endtask

  initial begin
    msg_t m; int t0, t1; block_t rd, wval; seed_t s, s_ev;
    key_we = 0; key_pid = '0; key_val = '0; proc_en = '0; ld_we = 0; ld_addr = '0;
    ld_data = '0; cpu_valid = 0; cpu_op = OP_RD; cpu_pid = '0; cpu_addr = '0;
    cpu_wdata = '0; out_ready = 1; dout_ready = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      key_we = 1; key_pid = pid_t'(p); key_val = key_of(p); @(posedge clk); #1;
    end
    key_we = 0;
    for (int a = 0; a < NB; a += NC) begin
      ld_we = 1; ld_addr = baddr_t'(a);
      ld_data = plain_of(a) ^ ref_kb(64'd0, 16'(a), key_of((a / 4) % 2));
      @(posedge clk); #1;
    end
    ld_we = 0;
    proc_en = 4'b0011;
    repeat (800) @(posedge clk); #1;
    check(n_seed_req == KE, $sformatf("%0d seeds asked for, cache holds %0d", n_seed_req, KE));
    check(granted[0].size() > 0 && granted[1].size() > 0, "both processes get KBs");

    // sender miss: block 0 only in memory
    s = granted[0].pop_front();
    tx.push_back(mk(M_FWD, TCM, 0, 0, s)); tx[$].req = 2;
    t0 = cyc;
    wait_msg(m, t1);
    check(m.mtype == M_DATA && int'(m.dst) == 2 && m.seed == s, "data sent to requestor");
    check(m.data == (plain_of(0) ^ ref_kb(s, 16'd0, key_of(0))), "block re-encrypted with the forwarded seed");
    check(t1 - t0 <= 70, $sformatf("sender miss took %0d cycles", t1 - t0));
    // local read: decrypt from memory with the initial KB
    cpu(OP_RD, 0, 0, '0); cpu_wait(rd);
    check(rd == plain_of(0), "local read decrypted from memory");
    cpu(OP_RD, 0, 0, '0); cpu_wait(rd);
    check(rd == plain_of(0) && n_ev["hit"] == 1, "second local read hits the cache");
    // sender hit, write permission given away
    s = granted[0].pop_front();
    tx.push_back(mk(M_FWD, TCM, 0, 0, s)); tx[$].req = 3; tx[$].rw = 1;
    t0 = cyc;
    wait_msg(m, t1);
    check(m.data == (plain_of(0) ^ ref_kb(s, 16'd0, key_of(0))) && m.rw, "sent from cache");
    check(t1 - t0 <= 8, $sformatf("sender hit took %0d cycles", t1 - t0));
    // remote miss
    cpu(OP_RD, 0, 0, '0);
    wait_msg(m, t1);
    check(m.mtype == M_REQ_RD && int'(m.dst) == TCM && int'(m.addr) == 0, "read miss goes to the TCM");
    wval = {16{32'h600df00d}};
    tx.push_back(mk(M_SEED_TO_REQ, TCM, 0, 0, 64'h500));
    repeat (100) @(posedge clk);
    tx.push_back(mk(M_DATA, 3, 0, 0, 64'h500));
    tx[$].data = wval ^ ref_kb(64'h500, 16'd0, key_of(0));
    cpu_wait(rd);
    check(rd == wval && n_ev["hidden"] == 1, "remote data decrypted with the ready incoming KB");
    // upgrade
    wval = {16{32'h12345678}};
    cpu(OP_WR, 0, 0, wval);
    wait_msg(m, t1);
    check(m.mtype == M_REQ_WR, "write without M asks the TCM");
    tx.push_back(mk(M_UPG_ACK, TCM, 0, 0, '0));
    cpu_wait(rd);
    check(n_ev["upgrade"] == 1, "upgrade");
    // dirty eviction: refused once, then allowed
    cpu(OP_EV, 0, 0, '0);
    wait_msg(m, t1);
    check(m.mtype == M_SEED_USED && m.pid == 0, "eviction asks to withdraw a seed");
    tx.push_back(mk(M_USED_ACK, TCM, 0, 0, m.seed)); tx[$].flag = 0;
    wait_msg(m, t1);
    check(m.mtype == M_SEED_USED && n_ev["retry"] == 1, "refused seed: another tried");
    s_ev = m.seed;
    tx.push_back(mk(M_USED_ACK, TCM, 0, 0, m.seed)); tx[$].flag = 1;
    cpu_wait(rd);
    check(n_ev["evict"] == 1, "dirty block evicted");
    cpu(OP_RD, 0, 0, '0); cpu_wait(rd);
    check(rd == wval, "evicted block read back from memory");
    cpu(OP_EV, 0, 0, '0); cpu_wait(rd);         // clean: just dropped
    // fresh seed: KB computed on demand; block comes from memory (seed s_ev)
    tx.push_back(mk(M_FWD, TCM, 0, 0, 64'h777)); tx[$].req = 1; tx[$].flag = 1;
    wait_msg(m, t1);
    check(m.data == (wval ^ ref_kb(64'h777, 16'd0, key_of(0))), "on-demand KB, data from memory");
    check(n_ev["on_demand"] == 1 && n_ev["fwd_miss"] == 2, "on-demand path taken");
    // invalidation, then a miss whose data comes with another seed
    tx.push_back(mk(M_INV, TCM, 0, 0, '0));
    repeat (5) @(posedge clk);
    check(n_ev["inv"] == 1, "invalidation");
    cpu(OP_RD, 0, 0, '0);
    wait_msg(m, t1);
    check(m.mtype == M_REQ_RD, "read after invalidation misses");
    tx.push_back(mk(M_SEED_TO_REQ, TCM, 0, 0, 64'h600));
    tx.push_back(mk(M_DATA, 1, 0, 0, 64'h601));
    tx[$].data = wval ^ ref_kb(64'h601, 16'd0, key_of(0));
    cpu_wait(rd);
    check(rd == wval && n_ev["mismatch"] == 1, "data with another seed decrypted after recompute");
    // process 1 block 4 sent with a pre-generated KB of process 1
    s = granted[1].pop_front();
    tx.push_back(mk(M_FWD, TCM, 1, 4, s)); tx[$].req = 2;
    wait_msg(m, t1);
    check(m.data == (plain_of(4) ^ ref_kb(s, 16'd0, key_of(1))), "process 1 key used");
    check(n_ev["pregen"] == 3, "pre-generated KBs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
