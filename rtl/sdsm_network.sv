// sdsm_network -- one channel of the untrusted interconnect between cores
// and TCMs: a shared, in-order, fixed-latency message channel. The system
// uses three instances as virtual networks (requests, TCM control, data).
//
// A round-robin arbiter admits at most one message per cycle from the
// endpoints' send ports into an elastic pipeline of LATENCY stages; the
// message at the last stage is offered to the endpoint named in its `dst`
// field and leaves when that endpoint is ready, holding the channel until
// then. A message accepted in cycle t is offered at cycle t+LATENCY when
// nothing is stalled. Messages are delivered in the order they were
// admitted, which the protocol relies on (a seed sent to a requestor always
// arrives before the data encrypted with it, both using the data channel).
// The 100-cycle core-to-core latency follows the design's evaluation; the
// channel structure, its arbitration and the split into virtual networks
// are this implementation's choices, standing in for whatever medium
// connects the chips.
module sdsm_network
  import sdsm_pkg::*;
#(
  parameter int N_EP    = 257,
  parameter int LATENCY = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_EP-1:0] in_valid,
  input  msg_t            in_msg   [N_EP],
  output logic [N_EP-1:0] in_ready,
  output logic [N_EP-1:0] out_valid,
  output msg_t            out_msg,
  input  logic [N_EP-1:0] out_ready
);
  localparam int EW = $clog2(N_EP);

  logic [LATENCY-1:0] v;
  msg_t          d [LATENCY];
  logic [EW-1:0] rr_q;
  logic [LATENCY-1:0] can_take;   // stage may load this cycle
  logic [LATENCY-1:0] moves;      // stage content moves on this cycle
  logic          head_go;
  logic          gnt_valid;
  logic [EW-1:0] gnt;

  // round-robin: first requester at or after rr_q, else the first one
  always_comb begin
    gnt_valid = 1'b0;
    gnt       = '0;
    for (int i = N_EP - 1; i >= 0; i--)
      if (in_valid[i]) begin gnt_valid = 1'b1; gnt = EW'(i); end
    for (int i = N_EP - 1; i >= 0; i--)
      if (in_valid[i] && i >= int'(rr_q)) gnt = EW'(i);
  end

  always_comb begin
    head_go = v[LATENCY-1] && (int'(d[LATENCY-1].dst) < N_EP) &&
              out_ready[int'(d[LATENCY-1].dst) % N_EP];
    // a stage can load when a bubble exists at or after it, or the head leaves
    for (int i = 0; i < LATENCY; i++)
      can_take[i] = head_go || (|(~v & ({LATENCY{1'b1}} << i)));
    for (int i = 0; i < LATENCY; i++)
      moves[i] = (i == LATENCY - 1) ? head_go : (v[i] && can_take[(i + 1) % LATENCY]);
    in_ready = '0;
    if (gnt_valid && can_take[0]) in_ready[gnt] = 1'b1;
    out_msg   = d[LATENCY-1];
    out_valid = '0;
    if (v[LATENCY-1] && int'(d[LATENCY-1].dst) < N_EP)
      out_valid[int'(d[LATENCY-1].dst) % N_EP] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_q <= '0;
      v <= '0;
    end else begin
      for (int i = LATENCY - 1; i >= 1; i--) begin
        if (moves[i-1]) begin
          v[i] <= 1'b1;
          d[i] <= d[i-1];
        end else if (moves[i]) begin
          v[i] <= 1'b0;
        end
      end
      if (gnt_valid && can_take[0]) begin
        v[0] <= 1'b1;
        d[0] <= in_msg[gnt];
        rr_q <= (int'(gnt) == N_EP - 1) ? '0 : gnt + 1'b1;
      end else if (moves[0]) begin
        v[0] <= 1'b0;
      end
    end
  end

  // a message to a non-existent endpoint would block the channel forever
  assert property (@(posedge clk) disable iff (!rst_n)
                   v[LATENCY-1] |-> int'(d[LATENCY-1].dst) < N_EP);
endmodule
