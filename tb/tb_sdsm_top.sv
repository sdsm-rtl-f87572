// tb_sdsm_top -- end-to-end test of the secure shared memory with 4 cores,
// 2 TCMs and 16 blocks at the full 100-cycle interconnect latency: each
// protocol mechanism is made to happen and counted, then random traffic is
// checked against a shadow copy (body in sdsm_top_tb_body.svh).
module tb_sdsm_top;
  localparam int N_CORES     = 4;
  localparam int N_TCM       = 2;
  localparam int N_PROC      = 4;
  localparam int BLOCKS      = 16;
  localparam int NET_LATENCY = 100;
  localparam int N_RANDOM    = 150;
  localparam int WATCHDOG    = 400000;

  `include "sdsm_top_tb_body.svh"

  sdsm_top #(.N_CORES(N_CORES), .N_TCM(N_TCM), .N_PROC(N_PROC), .BLOCKS(BLOCKS),
             .NET_LATENCY(NET_LATENCY)) dut (.*);

  // the body prints the result (normal end or watchdog) and sets run_over
  initial begin
    wait (run_over);
    $finish;
  end
endmodule
