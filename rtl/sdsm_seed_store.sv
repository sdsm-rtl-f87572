// sdsm_seed_store -- the TCM's record of every sender's outstanding seeds.
//
// One queue per (sender core, secure process), DEPTH seeds deep, oldest
// first. PUSH appends a newly granted seed, POP takes the oldest (the seed a
// requestor is told to expect), REMOVE withdraws a given seed wherever it
// is (the sender wants to use it for a local eviction) and reports whether
// it was still there. One operation per cycle on the queue selected by
// core/pid; head, count and the REMOVE match are combinational.
// The queue of outstanding seeds per sender, served oldest first, and its
// depth of 10 follow the design; REMOVE is this implementation's way of
// keeping local evictions and remote requests from using the same seed.
module sdsm_seed_store
  import sdsm_pkg::*;
#(
  parameter int N_CORES = 256,
  parameter int N_PROC  = 4,
  parameter int DEPTH   = 10,
  localparam int CW     = $clog2(DEPTH + 1),
  localparam int NQ     = N_CORES * N_PROC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    op,        // 0 none, 1 push, 2 pop, 3 remove
  input  node_id_t      core,
  input  pid_t          pid,
  input  seed_t         seed,      // push value / remove key
  output logic          head_valid,
  output seed_t         head_seed,
  output logic          full,
  output logic          found,     // remove key is in the queue
  output logic [CW-1:0] count
);
  localparam logic [1:0] OP_PUSH = 2'd1, OP_POP = 2'd2, OP_REMOVE = 2'd3;

  seed_t         mem [NQ][DEPTH];
  logic [CW-1:0] cnt [NQ];
  int            q;
  int            hit_at;

  always_comb begin
    q          = (int'(core) % N_CORES) * N_PROC + (int'(pid) % N_PROC);
    count      = cnt[q];
    head_valid = (cnt[q] != '0);
    head_seed  = mem[q][0];
    full       = (cnt[q] == CW'(DEPTH));
    found      = 1'b0;
    hit_at     = DEPTH;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (i < int'(cnt[q]) && mem[q][i] == seed) begin
        found  = 1'b1;
        hit_at = i;
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NQ; j++) cnt[j] <= '0;
    end else begin
      case (op)
        OP_PUSH: if (!full) begin
          mem[q][cnt[q]] <= seed;
          cnt[q]         <= cnt[q] + 1'b1;
        end
        OP_POP: if (head_valid) begin
          for (int i = 0; i < DEPTH - 1; i++) mem[q][i] <= mem[q][i+1];
          cnt[q] <= cnt[q] - 1'b1;
        end
        OP_REMOVE: if (found) begin
          for (int i = 0; i < DEPTH - 1; i++)
            if (i >= hit_at) mem[q][i] <= mem[q][i+1];
          cnt[q] <= cnt[q] - 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
