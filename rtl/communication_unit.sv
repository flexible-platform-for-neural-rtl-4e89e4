// communication_unit: the communication unit of a coordinating processor,
// which hands result tokens to the interconnection network on CP.DO.
//
// A 2-entry queue decouples the execution unit from the network: the
// execution unit may write whenever `space` is high, and space depends only
// on the queue's own count, never on this cycle's out_ready, so no
// combinational path runs from the network back into the CP. With the
// network taking a token every cycle the queue holds at most one and
// passes one token per cycle with one cycle of latency. `init` empties it.
// Sending results into the network follows the architecture; the queue is
// this design's choice.
module communication_unit
  import ndf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   wr,
  input  token_t wtok,
  output logic   space,
  output logic   out_valid,
  output token_t out_tok,
  input  logic   out_ready
);
  token_t     q [2];
  logic       rd;
  logic [1:0] cnt;

  assign space     = (cnt < 2'd2);
  assign out_valid = (cnt != 2'd0);
  assign out_tok   = q[rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      rd  <= 1'b0;
    end else if (init) begin
      cnt <= '0;
      rd  <= 1'b0;
    end else begin
      cnt <= cnt + 2'(wr && space) - 2'(out_valid && out_ready);
      if (out_valid && out_ready) rd <= ~rd;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && space && !init) q[rd ^ cnt[0]] <= wtok;
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr |-> space);
endmodule
