// data_queue_unit: the data queue unit (DQU), where data tokens wait when no
// coordinating processor can take them.
//
// Two circular FIFOs of DEPTH tokens each, one per priority level P. A put
// writes the token into the FIFO of its priority; a get takes the oldest
// high-priority token if there is one, else the oldest low-priority token.
// Interface: put/put_tok, allowed when room[put_tok.p] (the FIFO of that
// priority has room; room does not depend on put_tok, so a caller may pick
// the token after looking at it),
// get_valid/get_tok with get (take it this cycle). Both may happen in one
// cycle. `init` empties both FIFOs.
// Buffering waiting tokens follows the architecture; serving priority P
// first and the two-FIFO organisation are this design's choice.
module data_queue_unit
  import ndf_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   put,
  input  token_t put_tok,
  output logic [1:0] room,
  output logic   get_valid,
  output token_t get_tok,
  input  logic   get,
  output logic [$clog2(DEPTH):0] count_hi,
  output logic [$clog2(DEPTH):0] count_lo
);
  localparam int unsigned AW = $clog2(DEPTH);

  token_t          mem [2][DEPTH];
  logic [AW-1:0]   wp [2];
  logic [AW-1:0]   rp [2];
  logic [AW:0]     cnt [2];
  logic            sel;        // FIFO served by a get: 1 = high priority
  logic            do_put [2];
  logic            do_get [2];

  assign sel       = (cnt[1] != 0);
  assign get_valid = (cnt[1] != 0) || (cnt[0] != 0);
  assign get_tok   = mem[sel][rp[sel]];
  assign room[0]   = (cnt[0] < (AW+1)'(DEPTH));
  assign room[1]   = (cnt[1] < (AW+1)'(DEPTH));
  assign count_hi  = cnt[1];
  assign count_lo  = cnt[0];

  always_comb begin
    for (int q = 0; q < 2; q++) begin
      do_put[q] = put && room[q] && (put_tok.p == q[0]);
      do_get[q] = get && get_valid && (sel == q[0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 2; q++) begin
        wp[q] <= '0; rp[q] <= '0; cnt[q] <= '0;
      end
    end else if (init) begin
      for (int q = 0; q < 2; q++) begin
        wp[q] <= '0; rp[q] <= '0; cnt[q] <= '0;
      end
    end else begin
      for (int q = 0; q < 2; q++) begin
        if (do_put[q]) wp[q] <= (wp[q] == AW'(DEPTH-1)) ? '0 : wp[q] + 1'b1;
        if (do_get[q]) rp[q] <= (rp[q] == AW'(DEPTH-1)) ? '0 : rp[q] + 1'b1;
        cnt[q] <= cnt[q] + (AW+1)'(do_put[q]) - (AW+1)'(do_get[q]);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < 2; q++)
      if (do_put[q] && !init) mem[q][wp[q]] <= put_tok;
  end

  // A put is only legal when its FIFO has room, a get when a token waits.
  assert property (@(posedge clk) disable iff (!rst_n) put |-> room[put_tok.p]);
  assert property (@(posedge clk) disable iff (!rst_n) get |-> get_valid);
endmodule
