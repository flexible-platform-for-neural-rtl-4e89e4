// tb_data_queue_unit: random puts and gets of tokens of both priorities
// against two reference queues. Checks that a get returns the oldest
// high-priority token while one waits, otherwise the oldest low-priority
// one, that room and the counts are right, that a full queue refuses
// further tokens, and that init empties the unit.
module tb_data_queue_unit;
  import ndf_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0, init = 0, put = 0, get = 0;
  token_t put_tok, get_tok;
  logic [1:0] room;
  logic get_valid;
  logic [$clog2(DEPTH):0] count_hi, count_lo;
  token_t q [2][$];
  int checks = 0, failures = 0;
  int n_full = 0;

  data_queue_unit #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .init, .put, .put_tok, .room,
    .get_valid, .get_tok, .get, .count_hi, .count_lo);
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
    put_tok = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      put_tok = token_t'({$urandom, $urandom});
      // phases: mostly puts (fill up), mostly gets, mixed
      put  = ($urandom_range(0, 99) < ((n / 300) % 2 == 0 ? 80 : 30));
      init = (n == 2000);
      check(room[0] == (q[0].size() < DEPTH) && room[1] == (q[1].size() < DEPTH), "room");
      if (q[put_tok.p].size() == DEPTH) n_full++;
      put = put && room[put_tok.p];
      check(get_valid == (q[0].size() + q[1].size() > 0), "get_valid");
      check(count_hi == ($clog2(DEPTH)+1)'(q[1].size()) &&
            count_lo == ($clog2(DEPTH)+1)'(q[0].size()), "counts");
      get = get_valid && ($urandom_range(0, 99) < 50);
      if (get_valid) begin
        if (q[1].size() > 0) check(get_tok == q[1][0], "oldest high-priority token");
        else                 check(get_tok == q[0][0], "oldest low-priority token");
      end
      @(posedge clk);
      if (init) begin q[0].delete(); q[1].delete(); end
      else begin
        if (get) begin
          if (q[1].size() > 0) void'(q[1].pop_front());
          else                 void'(q[0].pop_front());
        end
        if (put) q[put_tok.p].push_back(put_tok);
      end
    end
    check(n_full > 0, "a queue was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
