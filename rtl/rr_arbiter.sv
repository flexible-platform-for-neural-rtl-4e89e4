// rr_arbiter: round-robin arbiter used for the resources the coordinating
// processors share (frame store, neuron stack bank).
//
// gnt is one-hot (or zero) among req, combinational in the request cycle.
// The search starts one past the last granted requester, so every
// requester that keeps asking is granted within N cycles. The pointer moves
// only on a grant.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;
  logic [W-1:0] last;

  always_comb begin
    int unsigned k;
    gnt = '0;
    for (int unsigned i = 1; i <= N; i++) begin
      k = (int'(last) + i) % N;
      if (req[k] && gnt == '0) gnt[k] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= W'(N-1);
    else begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) last <= W'(i);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
