// sdsm_proc_monitor -- process-aware choice of what to pre-generate.
//
// A sender counts, per secure process, the block requests it has recently
// served (a saturating score incremented per request and halved every
// DECAY_PERIOD cycles, so old requests fade). When a KB slot is free it
// pre-generates for the enabled process with the largest
// (score + 1) / (held + 1), where `held` is how many outstanding KBs (ready,
// being computed or asked for) the process already has: processes asked for
// more blocks get proportionally more KBs, and every enabled process keeps
// at least a chance of one. The comparison is done by cross-multiplication.
// Combinational choice, registered scores. Learning from recent requests
// and favouring busy processes follow the design; the score, decay and
// proportional rule are this implementation's choices.
module sdsm_proc_monitor
  import sdsm_pkg::*;
#(
  parameter int N_PROC       = 4,
  parameter int SCORE_W      = 8,
  parameter int HELD_W       = 5,
  parameter int DECAY_PERIOD = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,     // a block request was served
  input  pid_t              req_pid,
  input  logic [N_PROC-1:0] enable,        // secure processes on this core
  input  logic [HELD_W-1:0] held [N_PROC],
  output logic              pick_valid,
  output pid_t              pick_pid,
  output logic [SCORE_W-1:0] score [N_PROC]
);

  localparam int DW = $clog2(DECAY_PERIOD);
  logic [DW-1:0] tick_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tick_q <= '0;
      for (int p = 0; p < N_PROC; p++) score[p] <= '0;
    end else begin
      tick_q <= tick_q + 1'b1;
      for (int p = 0; p < N_PROC; p++) begin
        logic [SCORE_W-1:0] s;
        s = score[p];
        if (tick_q == '1) s = s >> 1;
        if (req_valid && int'(req_pid) == p && s != '1) s = s + 1'b1;
        score[p] <= s;
      end
    end
  end

  localparam int PW = SCORE_W + HELD_W + 2;
  always_comb begin
    logic [PW-1:0] lhs, rhs;
    pick_valid = 1'b0;
    pick_pid   = '0;
    lhs        = '0;
    rhs        = '0;
    for (int p = 0; p < N_PROC; p++) begin
      if (enable[p]) begin
        lhs = PW'(score[p] + 1'b1) * PW'(held[int'(pick_pid)] + 1'b1);
        rhs = PW'(score[int'(pick_pid)] + 1'b1) * PW'(held[p] + 1'b1);
        if (!pick_valid || lhs > rhs) begin
          pick_valid = 1'b1;
          pick_pid   = pid_t'(p);
        end
      end
    end
  end

endmodule
