// tb_sdsm_tcm -- drives the trusted coherence manager with protocol
// messages and checks every reply: seed grants from the per-process
// counter, refusal when a sender's queue is full, the owner's oldest seed
// going to the requestor and to the owner on a miss, a flagged fresh seed
// when the owner has none, invalidations on writes, upgrades, and seed
// withdrawal for evictions.
module tb_sdsm_tcm;
  import sdsm_pkg::*;
  localparam int NC = 4, NB = 8, NP = 2, SELF = NC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  msg_t in_msg, out_msg;
  logic ev_fwd_pregen, ev_fwd_fresh, ev_inv, ev_used_fail;
  int checks = 0, failures = 0;
  msg_t got [$];

  sdsm_tcm #(.N_CORES(NC), .N_TCM(1), .TCM_ID(0), .N_PROC(NP), .BLOCKS(NB)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_msg);

  task automatic send(msg_type_e t, int src, int pid, int addr, seed_t s = '0);
    in_msg = '0;
    in_msg.mtype = t; in_msg.src = node_id_t'(src); in_msg.dst = node_id_t'(SELF);
    in_msg.pid = pid_t'(pid); in_msg.addr = baddr_t'(addr); in_msg.seed = s;
    in_valid = 1;
    forever begin @(negedge clk); if (in_ready) break; end
    @(posedge clk); #1 in_valid = 0;
    repeat (12) @(posedge clk);
    #1;
  endtask

  function automatic seed_t sd(int n);
    return {8'd0, 56'(n)};
  endfunction

  task automatic expect_msg(msg_type_e t, int dst, seed_t s, bit flag, string what);
    msg_t m;
    check(got.size() > 0, {what, ": a message"});
    if (got.size() == 0) return;
    m = got.pop_front();
    check(m.mtype == t && int'(m.dst) == dst && int'(m.src) == SELF,
          $sformatf("%s: type %0d dst %0d", what, m.mtype, m.dst));
    check(m.seed == s && m.flag == flag,
          $sformatf("%s: seed %h flag %0d", what, m.seed, m.flag));
  endtask

  initial begin
    msg_t m;
    in_valid = 0; in_msg = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // core 0 asks for two seeds of process 0, core 0 one of process 1
    send(M_SEED_REQ, 0, 0, 0); expect_msg(M_SEED_GRANT, 0, sd(1), 1, "grant 1");
    send(M_SEED_REQ, 0, 0, 0); expect_msg(M_SEED_GRANT, 0, sd(2), 1, "grant 2");
    send(M_SEED_REQ, 0, 1, 0); expect_msg(M_SEED_GRANT, 0, sd(1), 1, "grant p1 own counter");
    // core 1 reads block 4 (owner core 0): oldest seed of core 0 to both
    send(M_REQ_RD, 1, 0, 4);
    expect_msg(M_SEED_TO_REQ, 1, sd(1), 0, "seed to requestor first");
    m = got[0];
    expect_msg(M_FWD, 0, sd(1), 0, "forward to owner with the same seed");
    check(int'(m.req) == 1 && m.rw == 0 && int'(m.addr) == 4, "forward names requestor/block");
    check(got.size() == 0, "no invalidation on a read");
    // core 2 writes block 4: next seed, invalidate reader core 1
    send(M_REQ_WR, 2, 0, 4);
    expect_msg(M_SEED_TO_REQ, 2, sd(2), 0, "write: seed to requestor");
    m = got[0];
    expect_msg(M_FWD, 0, sd(2), 0, "write: forward to owner");
    check(m.rw == 1, "forward asks for write");
    expect_msg(M_INV, 1, '0, 0, "reader invalidated");
    check(got.size() == 0, "only the reader invalidated");
    // core 3 reads block 4: owner is now core 2, which has no seeds -> fresh
    send(M_REQ_RD, 3, 0, 4);
    expect_msg(M_SEED_TO_REQ, 3, sd(3), 0, "fresh seed to requestor");
    expect_msg(M_FWD, 2, sd(3), 1, "fresh seed flagged to owner");
    // core 2 (owner, shared with 3) writes again: upgrade + invalidate 3
    send(M_REQ_WR, 2, 0, 4);
    expect_msg(M_UPG_ACK, 2, '0, 0, "upgrade without data");
    expect_msg(M_INV, 3, '0, 0, "other sharer invalidated");
    // seed withdrawal
    send(M_SEED_REQ, 1, 0, 0); expect_msg(M_SEED_GRANT, 1, sd(4), 1, "grant 4");
    send(M_SEED_REQ, 1, 0, 0); expect_msg(M_SEED_GRANT, 1, sd(5), 1, "grant 5");
    send(M_SEED_USED, 1, 0, 0, sd(5)); expect_msg(M_USED_ACK, 1, sd(5), 1, "withdraw 5");
    send(M_SEED_USED, 1, 0, 0, sd(5)); expect_msg(M_USED_ACK, 1, sd(5), 0, "5 already gone");
    // core 0 reads block 1 (owner core 1): gets 4, not the withdrawn 5
    send(M_REQ_RD, 0, 0, 1);
    expect_msg(M_SEED_TO_REQ, 0, sd(4), 0, "oldest remaining seed");
    expect_msg(M_FWD, 1, sd(4), 0, "forward with it");
    // queue capacity: core 3 process 1 takes 10 seeds, the 11th is refused
    for (int i = 0; i < 10; i++) begin
      send(M_SEED_REQ, 3, 1, 0);
      expect_msg(M_SEED_GRANT, 3, sd(2 + i), 1, "grant while room");
    end
    send(M_SEED_REQ, 3, 1, 0);
    m = got[0];
    check(m.mtype == M_SEED_GRANT && !m.flag, "11th seed refused");
    void'(got.pop_front());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
