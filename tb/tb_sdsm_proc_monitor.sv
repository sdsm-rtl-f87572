// tb_sdsm_proc_monitor -- checks which process gets the next pre-generated
// KB: the most requested one, moderated by the KBs it already holds,
// never a disabled one; and that scores saturate and decay.
module tb_sdsm_proc_monitor;
  import sdsm_pkg::*;
  localparam int NP = 4, DP = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, pick_valid;
  pid_t req_pid, pick_pid;
  logic [NP-1:0] enable;
  logic [4:0] held [NP];
  logic [7:0] score [NP];
  int checks = 0, failures = 0;

  sdsm_proc_monitor #(.N_PROC(NP), .DECAY_PERIOD(DP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic reqs(int p, int n);
    for (int i = 0; i < n; i++) begin req_valid = 1; req_pid = pid_t'(p); tick(); end
    req_valid = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_pid = '0; enable = '0;
    for (int p = 0; p < NP; p++) held[p] = '0;
    repeat (3) tick();
    rst_n = 1; tick();
    #1 check(!pick_valid, "no process enabled: nothing picked");
    enable = 4'b1010; #1;
    check(pick_valid && pick_pid == 1, "lowest enabled process when no history");
    reqs(3, 5);
    check(score[3] == 5, "score counts requests");
    check(pick_pid == 3, "most requested process picked");
    reqs(0, 20);
    check(pick_pid == 3, "requests of a disabled process are ignored for picking");
    // (5+1)/(held+1) against (0+1)/(0+1)
    held[3] = 5'd4; #1;
    check(pick_pid == 3, "6/5 beats 1/1: process 3 still picked");
    held[3] = 5'd5; #1;
    check(pick_pid == 1, "6/6 ties 1/1: process 1 (first in order) gets a KB");
    held[3] = 5'd0;
    // saturation
    reqs(1, 300);
    check(score[1] == 8'hff, "score saturates");
    check(pick_pid == 1, "busiest process picked");
    // decay: at most DP cycles until the next halving
    begin
      logic [7:0] prev;
      prev = score[1];
      repeat (DP) tick();
      check(score[1] == prev >> 1, $sformatf("score halves every period (%0d -> %0d)",
                                               prev, score[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
