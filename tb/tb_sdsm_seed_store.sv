// tb_sdsm_seed_store -- random push / pop / remove on the per-(core,
// process) seed queues, checked against a queue model: oldest-first order,
// capacity of 10, removal from the middle, independence of the queues.
module tb_sdsm_seed_store;
  import sdsm_pkg::*;
  localparam int NC = 4, NP = 2, D = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] op; node_id_t core; pid_t pid; seed_t seed;
  logic head_valid, full, found; seed_t head_seed;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  seed_t model [NC*NP][$];
  int n_push, n_pop, n_rm_hit, n_rm_miss, n_full;

  sdsm_seed_store #(.N_CORES(NC), .N_PROC(NP), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed_t next_seed;
    op = 0; core = '0; pid = '0; seed = '0;
    next_seed = 64'h100;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int q, k, m;
      core = node_id_t'($urandom_range(NC - 1));
      pid  = pid_t'($urandom_range(NP - 1));
      q = int'(core) * NP + int'(pid);
      k = $urandom_range(9);
      if (k < 5) begin op = 2'd1; seed = next_seed; next_seed++; end
      else if (k < 8) begin op = 2'd2; seed = '0; end
      else begin
        op = 2'd3;
        // half the time a seed that is in the queue
        if (model[q].size() > 0 && $urandom_range(1))
          seed = model[q][$urandom_range(model[q].size() - 1)];
        else seed = 64'hdead;
      end
      #1;
      m = model[q].size();
      check(count == m, "count");
      check(head_valid == (m > 0), "head valid");
      if (m > 0) check(head_seed == model[q][0], "head is the oldest seed");
      check(full == (m == D), "full");
      case (op)
        2'd1: if (m < D) begin model[q].push_back(seed); n_push++; end else n_full++;
        2'd2: if (m > 0) begin void'(model[q].pop_front()); n_pop++; end
        default: begin
          int at; at = -1;
          foreach (model[q][j]) if (model[q][j] == seed && at < 0) at = j;
          check(found == (at >= 0), "remove finds the seed");
          if (at >= 0) begin model[q].delete(at); n_rm_hit++; end else n_rm_miss++;
        end
      endcase
      @(posedge clk); #1;
    end
    op = 0;
    check(n_full > 0 && n_rm_hit > 0 && n_rm_miss > 0 && n_pop > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
