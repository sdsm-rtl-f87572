// tb_sdsm_kb_cache -- fills the outstanding-KB cache, checks that it reports
// full, the order in which pending KBs are offered for computation, lookup by
// (process, seed), the "any ready KB of a process" lookup with reservation,
// and that freed entries are reused; occupancy counts are checked throughout.
module tb_sdsm_kb_cache;
  import sdsm_pkg::*;
  localparam int N = 10, NP = 4, IW = $clog2(N), CW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_valid, full, pend_valid, calc_start, fill_valid;
  pid_t alloc_pid, pend_pid, lk_pid, ev_pid;
  seed_t alloc_seed, pend_seed, lk_seed, ev_seed;
  logic [IW-1:0] pend_idx, fill_idx, lk_idx, ev_idx, res_idx, free_idx;
  block_t fill_kb, lk_kb, ev_kb;
  logic lk_hit, lk_ready, ev_hit, reserve_valid, unreserve_valid, free_valid;
  logic [CW-1:0] used;
  logic [CW-1:0] held [NP];
  int checks = 0, failures = 0;

  sdsm_kb_cache #(.N_ENTRIES(N), .N_PROC(NP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  function automatic block_t kb_for(seed_t s);
    return {8{s}} ^ {16{32'h5a5a1234}};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_valid = 0; calc_start = 0; fill_valid = 0; reserve_valid = 0;
    unreserve_valid = 0; free_valid = 0; alloc_pid = '0; alloc_seed = '0;
    lk_pid = '0; lk_seed = '0; ev_pid = '0; fill_idx = '0; fill_kb = '0;
    res_idx = '0; free_idx = '0;
    repeat (3) tick();
    rst_n = 1; tick();
    check(used == 0 && !full && !pend_valid, "empty after reset");
    // 10 seeds: process i%3, seed 100+i
    for (int i = 0; i < N; i++) begin
      alloc_valid = 1; alloc_pid = pid_t'(i % 3); alloc_seed = 64'(100 + i);
      tick();
    end
    alloc_valid = 0;
    check(full && used == CW'(N), "full after 10 allocations");
    check(held[0] == 4 && held[1] == 3 && held[2] == 3 && held[3] == 0, "held per process");
    // compute all KBs in the order offered
    for (int i = 0; i < N; i++) begin
      logic [IW-1:0] idx; seed_t s; pid_t p;
      check(pend_valid, "a KB is pending");
      idx = pend_idx; s = pend_seed; p = pend_pid;
      check(pend_pid == pid_t'((int'(s) - 100) % 3), "pending pid matches seed");
      calc_start = 1; tick(); calc_start = 0;
      lk_pid = p; lk_seed = s; #1;
      check(lk_hit && !lk_ready, "entry being computed is found but not ready");
      fill_valid = 1; fill_idx = idx; fill_kb = kb_for(s); tick(); fill_valid = 0;
    end
    check(!pend_valid, "nothing pending");
    // lookup by seed
    lk_pid = 1; lk_seed = 64'd104; #1;
    check(lk_hit && lk_ready && lk_kb == kb_for(64'd104), "lookup seed 104");
    lk_pid = 2; lk_seed = 64'd104; #1;
    check(!lk_hit, "same seed, other process misses");
    lk_pid = 0; lk_seed = 64'd555; #1;
    check(!lk_hit, "unknown seed misses");
    // eviction lookup and reservation
    ev_pid = 2; #1;
    check(ev_hit && (ev_seed == 64'd102 || ev_seed == 64'd105 || ev_seed == 64'd108),
          "ready KB of process 2");
    check(ev_kb == kb_for(ev_seed), "eviction KB matches its seed");
    begin
      seed_t first;
      first = ev_seed;
      reserve_valid = 1; res_idx = ev_idx; tick(); reserve_valid = 0;
      check(ev_hit && ev_seed != first, "reserved entry is skipped");
      unreserve_valid = 1; tick(); unreserve_valid = 0;
      check(ev_hit && ev_seed == first, "unreserved entry is offered again");
    end
    ev_pid = 3; #1;
    check(!ev_hit, "no KB of process 3");
    // free one, reuse the slot
    lk_pid = 1; lk_seed = 64'd104; #1;
    free_valid = 1; free_idx = lk_idx; tick(); free_valid = 0;
    check(!full && used == CW'(N - 1) && held[1] == 2, "one entry freed");
    #1 check(!lk_hit, "freed seed no longer found");
    alloc_valid = 1; alloc_pid = 3; alloc_seed = 64'd900; tick(); alloc_valid = 0;
    check(full && held[3] == 1 && pend_valid && pend_seed == 64'd900, "slot reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
