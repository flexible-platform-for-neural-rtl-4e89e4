// tb_neuron_stack_bank: random pushes and pops on a few neuron stacks
// against reference queues. Checks that a pop returns the oldest stored
// output of that stack, the fill level, that a push to a full stack
// (capacity 2 * D_MAX) and a pop from an empty one are refused and
// flagged, and that init empties every stack.
module tb_neuron_stack_bank;
  import ndf_pkg::*;
  localparam int unsigned NSTK = 8, D_MAX = 2, CAP = 2 * D_MAX;
  logic clk = 0, rst_n = 0, init = 0, req = 0, push = 0;
  logic [$clog2(NSTK)-1:0] idx = '0;
  value_t wdata = '0, rdata;
  logic err;
  logic [$clog2(CAP):0] level;
  value_t q [NSTK][$];
  int checks = 0, failures = 0, n_over = 0, n_under = 0;
  bit exp_err;

  neuron_stack_bank #(.NSTK(NSTK), .D_MAX(D_MAX)) dut (.clk, .rst_n, .init, .req,
    .push, .idx, .wdata, .rdata, .err, .level);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_err = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(err == exp_err, "error flag");
      req   = ($urandom_range(0, 3) != 0);
      push  = ($urandom_range(0, 99) < ((n / 200) % 2 == 0 ? 70 : 30));
      idx   = $clog2(NSTK)'($urandom_range(0, 2));
      wdata = value_t'($urandom);
      init  = (n == 1500);
      #1;
      check(level == ($clog2(CAP)+1)'(q[idx].size()), "level");
      if (req && !push && q[idx].size() > 0) check(rdata == q[idx][0], "popped value is the oldest");
      @(posedge clk);
      exp_err = 0;
      if (init) for (int s = 0; s < NSTK; s++) q[s].delete();
      else if (req) begin
        if (push) begin
          if (q[idx].size() < CAP) q[idx].push_back(wdata);
          else begin exp_err = 1; n_over++; end
        end else begin
          if (q[idx].size() > 0) void'(q[idx].pop_front());
          else begin exp_err = 1; n_under++; end
        end
      end
    end
    check(n_over > 0 && n_under > 0, "overflow and underflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
