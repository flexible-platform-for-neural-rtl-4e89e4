// neuron_stack_bank: the neuron stacks of the modified neuron model, one per
// neuron, that keep forward-phase outputs o_j until the backward phase needs
// them for the weight update and error term.
//
// A neuron at depth d (distance to the output layer) sees its output reach
// the outputs in d steps and the error come back in another d, so with
// patterns pipelined one per step it holds at most c = 2d outputs. Every
// stack here therefore has capacity CAP = 2 * D_MAX, D_MAX being the depth
// of the whole network. Because patterns go through the network in order,
// the error of the oldest pattern arrives first, so a pop returns the
// oldest stored output: each stack is kept as a small circular queue.
// One access per cycle (push or pop of stack `idx`); pop data is
// combinational and valid in the request cycle. A push to a full stack or
// a pop from an empty one is refused and flagged on `err` for one cycle.
// The stack per neuron and c = 2d follow the architecture; the oldest-first
// order, the shared bank with a single port and the error flag are this
// design's choices.
module neuron_stack_bank
  import ndf_pkg::*;
#(
  parameter int unsigned NSTK  = 64,  // number of neurons with a stack
  parameter int unsigned D_MAX = 3    // depth of the network
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    init,
  input  logic                    req,
  input  logic                    push,   // 1: push wdata, 0: pop
  input  logic [$clog2(NSTK)-1:0] idx,
  input  value_t                  wdata,
  output value_t                  rdata,  // popped value
  output logic                    err,    // overflow / underflow (registered)
  output logic [$clog2(2*D_MAX):0] level  // fill level of stack idx
);
  localparam int unsigned CAP = 2 * D_MAX;
  localparam int unsigned PW  = (CAP > 1) ? $clog2(CAP) : 1;

  value_t                mem [NSTK][CAP];
  logic [PW-1:0]         head [NSTK];   // oldest entry
  logic [$clog2(CAP):0]  cnt  [NSTK];
  logic                  ok;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(CAP-1)) ? '0 : p + 1'b1;
  endfunction

  // Slot of the next push: head + cnt, modulo CAP.
  logic [PW:0]   tail_sum;
  logic [PW-1:0] tail;
  always_comb begin
    tail_sum = {1'b0, head[idx]} + (PW+1)'(cnt[idx]);
    tail     = (tail_sum >= (PW+1)'(CAP)) ? PW'(tail_sum - (PW+1)'(CAP))
                                          : PW'(tail_sum);
  end

  assign ok    = push ? (cnt[idx] < ($clog2(CAP)+1)'(CAP)) : (cnt[idx] != 0);
  assign rdata = mem[idx][head[idx]];
  assign level = cnt[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTK; s++) begin head[s] <= '0; cnt[s] <= '0; end
      err <= 1'b0;
    end else if (init) begin
      for (int s = 0; s < NSTK; s++) begin head[s] <= '0; cnt[s] <= '0; end
      err <= 1'b0;
    end else begin
      err <= req && !ok;
      if (req && ok) begin
        if (push) cnt[idx] <= cnt[idx] + 1'b1;
        else begin
          cnt[idx]  <= cnt[idx] - 1'b1;
          head[idx] <= inc(head[idx]);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req && ok && push && !init) mem[idx][tail] <= wdata;
  end
endmodule
