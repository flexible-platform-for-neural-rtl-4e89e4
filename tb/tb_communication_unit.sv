// tb_communication_unit: random writes (only when space is high) and random
// out_ready against a reference queue. Checks token order, that space is
// high exactly when fewer than 2 tokens wait, that out_valid follows the
// count, that a stream with out_ready held high passes one token per cycle,
// and that init empties the queue.
module tb_communication_unit;
  import ndf_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, wr = 0, space, out_valid, out_ready = 0;
  token_t wtok, out_tok;
  token_t q [$];
  int checks = 0, failures = 0, n_full = 0, streak = 0, max_streak = 0;

  communication_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wtok = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit stream;
      @(negedge clk);
      stream    = (n >= 2500 && n < 2700);
      wtok      = token_t'({$urandom, $urandom});
      init      = (n == 2000);
      out_ready = stream ? 1'b1 : ($urandom_range(0, 99) < 50);
      check(space == (q.size() < 2), "space");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() == 2) n_full++;
      wr = space && (stream || $urandom_range(0, 99) < 55);
      if (out_valid) check(out_tok == q[0], "order");
      @(posedge clk);
      if (stream && out_valid && out_ready) begin
        streak++;
        if (streak > max_streak) max_streak = streak;
      end else streak = 0;
      if (init) q.delete();
      else begin
        if (out_valid && out_ready) void'(q.pop_front());
        if (wr) q.push_back(wtok);
      end
    end
    check(n_full > 0, "queue was full");
    check(max_streak >= 150, $sformatf("one token per cycle when the network keeps up (%0d)", max_streak));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
