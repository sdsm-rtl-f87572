// tb_sdsm_aes128 -- checks the iterative AES-128 core against the FIPS-197
// appendix C.1 vector and against the reference model on random inputs, and
// checks the 11-cycle latency.
module tb_sdsm_aes128;
  import sdsm_pkg::*;
  import sdsm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  aes_blk_t key, pt, ct;
  int checks = 0, failures = 0;

  sdsm_aes128 dut (.clk, .rst_n, .start, .key, .pt, .busy, .done, .ct);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(aes_blk_t k, aes_blk_t p, aes_blk_t expect_ct);
    int lat;
    key = k; pt = p; start = 1;
    @(posedge clk); #1 start = 0;
    lat = 1;
    while (!done) begin @(posedge clk); #1 lat++; end
    check(ct == expect_ct, $sformatf("ct %h expected %h", ct, expect_ct));
    check(lat == 11, $sformatf("latency %0d expected 11", lat));
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; key = '0; pt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // FIPS-197 C.1
    check(aes_encrypt(128'h000102030405060708090a0b0c0d0e0f,
                      128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model vs FIPS-197");
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // FIPS-197 B
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 20; i++) begin
      aes_blk_t k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, aes_encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
