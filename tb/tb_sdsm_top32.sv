// tb_sdsm_top32 -- the end-to-end test of tb_sdsm_top (body in
// sdsm_top_tb_body.svh) on a 32-core system with every other parameter at
// its default: one TCM, 4 processes, 32 blocks, 10 outstanding KBs and
// seeds, 100-cycle interconnect. With 32 cores refilling their KB caches
// at once, the request network carries hundreds of seed requests to the
// single TCM, which exercises the separation of the virtual networks. The
// random phase is kept short; the watchdog ends the run after 200000 cycles.
module tb_sdsm_top32;
  localparam int N_CORES     = 32;
  localparam int N_TCM       = 1;
  localparam int N_PROC      = 4;
  localparam int BLOCKS      = 32;
  localparam int NET_LATENCY = 100;
  localparam int N_RANDOM    = 30;
  localparam int WATCHDOG    = 200000;

  `include "sdsm_top_tb_body.svh"

  sdsm_top #(.N_CORES(N_CORES)) dut (.*);

  // the body prints the result (normal end or watchdog) and sets run_over
  initial begin
    wait (run_over);
    $finish;
  end
endmodule
