// tb_sdsm_seed_counter -- seeds carry the TCM's id in their top byte, count
// up from 1 independently per process, are never 0 and never repeat.
module tb_sdsm_seed_counter;
  import sdsm_pkg::*;
  localparam int NP = 4, TID = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pid_t pid; logic take; seed_t seed; logic [NP-1:0] exhausted;
  int checks = 0, failures = 0;
  int next [NP];
  bit seen [logic [67:0]];

  sdsm_seed_counter #(.N_PROC(NP), .TCM_ID(TID)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pid = '0; take = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < NP; p++) next[p] = 1;
    #1 check(exhausted == '0, "no counter exhausted");
    for (int i = 0; i < 200; i++) begin
      int p;
      p = $urandom_range(NP - 1);
      pid = pid_t'(p); take = ($urandom_range(3) != 0);
      #1;
      check(seed == {8'(TID), 56'(next[p])}, $sformatf("seed of process %0d is %h", p, seed));
      if (take) begin
        check(!seen.exists({pid, seed}), "seed repeated within a process");
        seen[{pid, seed}] = 1;
        next[p]++;
      end
      @(posedge clk); #1;
    end
    take = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
