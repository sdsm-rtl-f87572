// tb_sdsm_network -- random traffic between 4 endpoints with random
// back-pressure: every message reaches its destination unchanged, in the
// order it was admitted, and takes exactly LATENCY cycles when nothing
// stalls.
module tb_sdsm_network;
  import sdsm_pkg::*;
  localparam int NE = 4, L = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NE-1:0] in_valid, in_ready, out_valid, out_ready;
  msg_t in_msg [NE];
  msg_t out_msg;
  int checks = 0, failures = 0;
  int cyc = 0;
  msg_t sent [$];
  int   sent_at [$];
  int   n_recv = 0, n_stalled = 0, n_exact = 0;
  bit   stall_mode = 0;

  sdsm_network #(.N_EP(NE), .LATENCY(L)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  int id = 0;
  logic [NE-1:0] taken = '0;   // offered message was accepted at the last edge

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++)
      if (in_valid[e] && in_ready[e]) begin
        sent.push_back(in_msg[e]);
        sent_at.push_back(cyc);
        taken[e] <= 1'b1;
      end
    for (int e = 0; e < NE; e++)
      if (out_valid[e] && out_ready[e]) begin
        msg_t exp_m; int t;
        n_recv++;
        exp_m = sent.pop_front();
        t = sent_at.pop_front();
        check(out_msg == exp_m, "message delivered in order and unchanged");
        check(int'(out_msg.dst) == e, "delivered to its destination");
        if (!stall_mode) begin
          check(cyc - t == L, $sformatf("latency %0d expected %0d", cyc - t, L));
          n_exact++;
        end
      end
  end

  initial begin
    in_valid = '0; out_ready = '1;
    for (int e = 0; e < NE; e++) in_msg[e] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      stall_mode = (phase == 1);
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        for (int e = 0; e < NE; e++) begin
          if (!in_valid[e] || taken[e]) begin
            // previous message taken (or none): maybe offer a new one
            taken[e] = 1'b0;
            in_valid[e] = ($urandom_range(3) == 0);
            in_msg[e] = '0;
            in_msg[e].mtype = M_DATA;
            in_msg[e].src = node_id_t'(e);
            in_msg[e].dst = node_id_t'($urandom_range(NE - 1));
            in_msg[e].seed = 64'(id++);
            in_msg[e].data = {16{$urandom}};
          end
        end
        if (stall_mode) begin
          out_ready = 4'($urandom);
          if (out_ready != '1) n_stalled++;
        end
      end
      @(negedge clk);
      in_valid = '0;
      out_ready = '1;
      repeat (3 * L + 50) @(negedge clk);
    end
    check(sent.size() == 0, "every message delivered");
    check(n_recv > 300 && n_exact > 100 && n_stalled > 100, "traffic exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
