// sdsm_fifo -- small synchronous FIFO with valid/ready on both sides, used
// as message queues in the nodes and the TCM.
//
// Push when in_valid && in_ready, pop when out_valid && out_ready; both may
// happen in the same cycle. The head is presented combinationally from the
// storage array (no read latency). `free` counts empty slots.
module sdsm_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  T                mem [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [CW-1:0]   cnt_q;
  logic            push, pop;

  assign in_ready  = (cnt_q != CW'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign out_data  = mem[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign free      = CW'(DEPTH) - cnt_q;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) begin
        mem[wr_q] <= in_data;
        wr_q      <= inc(wr_q);
      end
      if (pop) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + CW'(push) - CW'(pop);
    end
  end
endmodule
