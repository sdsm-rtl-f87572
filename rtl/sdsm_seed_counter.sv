// sdsm_seed_counter -- per-process universal write counter of one TCM.
//
// Every seed a TCM hands out comes from the counter of the process it is
// for, so a seed value (and thus a KB under that process' key) is used at
// most once. With several TCMs the seed space is partitioned: the top
// PART_W bits of every seed are the TCM's id. Counters start at 1 because
// seed 0 is reserved for the initial, address-based encryption. `seed` shows
// the next value for `pid` combinationally; `take` consumes it. A counter
// that reaches its last value stops and raises `exhausted` for that
// process rather than wrap (which would repeat a KB).
// Per-process counters in the TCM and partitioned seed ranges follow the
// design; the bit split and the stop-on-exhaustion rule are this
// implementation's choices. The top PART_W bits of `seed` are the constant
// TCM id by construction, so a netlist shows them as tied outputs.
module sdsm_seed_counter
  import sdsm_pkg::*;
#(
  parameter int N_PROC = 4,
  parameter int PART_W = 8,
  parameter int TCM_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pid_t              pid,
  input  logic              take,
  output seed_t             seed,
  output logic [N_PROC-1:0] exhausted
);
  localparam int CW = SEED_W - PART_W;
  logic [CW-1:0] ctr [N_PROC];

  always_comb begin
    seed = {PART_W'(TCM_ID), ctr[int'(pid) % N_PROC]};
    for (int p = 0; p < N_PROC; p++) exhausted[p] = (ctr[p] == '1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PROC; p++) ctr[p] <= CW'(1);
    end else if (take && !exhausted[int'(pid) % N_PROC]) begin
      ctr[int'(pid) % N_PROC] <= ctr[int'(pid) % N_PROC] + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) take |-> seed != '0);
endmodule
