// tb_sdsm_kb_gen -- checks keystream blocks for initial (seed 0, address
// based) and runtime (seed based) encryption against the reference model,
// that runtime KBs do not depend on the address, that seed 0 KBs do, and
// that a KB is ready within the 80-cycle budget.
module tb_sdsm_kb_gen;
  import sdsm_pkg::*;
  import sdsm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  seed_t seed; baddr_t va; aes_blk_t key; block_t kb;
  int checks = 0, failures = 0;

  sdsm_kb_gen dut (.clk, .rst_n, .start, .seed, .va, .key, .busy, .done, .kb);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic gen(seed_t s, baddr_t a, aes_blk_t k, output block_t r);
    int lat;
    seed = s; va = a; key = k; start = 1;
    @(posedge clk); #1 start = 0;
    lat = 1;
    while (!done) begin @(posedge clk); #1 lat++; end
    r = kb;
    check(lat <= 80, $sformatf("KB latency %0d above 80", lat));
    check(lat == 4*12 + 1, $sformatf("KB latency %0d expected 49", lat));
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t r1, r2;
    aes_blk_t k;
    start = 0; seed = '0; va = '0; key = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    k = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;
    gen(64'd0, 16'h0005, k, r1);
    check(r1 == ref_kb(64'd0, 16'h0005, k), "initial KB of block 5");
    gen(64'd0, 16'h0006, k, r2);
    check(r2 == ref_kb(64'd0, 16'h0006, k), "initial KB of block 6");
    check(r1 != r2, "initial KBs differ per block");
    gen(64'd5, 16'h0000, k, r2);
    check(r2 != ref_kb(64'd0, 16'h0005, k), "seed 5 KB differs from initial KB of VA 5");
    check(r2 == ref_kb(64'd5, 16'h0000, k), "runtime KB seed 5");
    gen(64'd5, 16'h1234, k, r1);
    check(r1 == r2, "runtime KB independent of address");
    for (int i = 0; i < 8; i++) begin
      seed_t s; baddr_t a;
      s = {$urandom, $urandom}; a = 16'($urandom);
      k = {$urandom, $urandom, $urandom, $urandom};
      gen(s, a, k, r1);
      check(r1 == ref_kb(s, a, k), "random KB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
