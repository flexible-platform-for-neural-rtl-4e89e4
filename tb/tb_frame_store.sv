// tb_frame_store: self-checking test of the frame store's direct operand
// matching. A reference model (AF bit and value per entry) predicts, for
// random match requests on a small address range, whether the partner is
// found and its value, and the number of waiting operands; init must
// clear every AF flag.
module tb_frame_store;
  import ndf_pkg::*;
  localparam int unsigned DEPTH = 32;
  logic clk = 0, rst_n = 0, init = 0, req = 0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  value_t wval = '0, partner;
  logic hit;
  logic [$clog2(DEPTH):0] occ;
  int checks = 0, failures = 0;
  bit     ref_af [DEPTH];
  value_t ref_v  [DEPTH];
  int     ref_occ = 0;

  frame_store #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .init, .req, .addr, .wval,
                                    .hit, .partner, .occupancy(occ));
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin ref_af[i] = 0; ref_v[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      #1;
      req  = ($urandom_range(0, 3) != 0);
      addr = $clog2(DEPTH)'($urandom_range(0, 7));
      wval = value_t'($urandom);
      init = (n == 1000);
      #1;
      if (req && !init) begin
        check(hit == ref_af[addr], $sformatf("hit at %0d n=%0d", addr, n));
        if (ref_af[addr]) check(partner == ref_v[addr], "partner value");
      end
      check(occ == ($clog2(DEPTH)+1)'(ref_occ), $sformatf("occupancy %0d vs %0d", occ, ref_occ));
      @(posedge clk);
      if (init) begin
        for (int i = 0; i < DEPTH; i++) ref_af[i] = 0;
        ref_occ = 0;
      end else if (req) begin
        if (ref_af[addr]) begin ref_af[addr] = 0; ref_occ--; end
        else begin ref_af[addr] = 1; ref_v[addr] = wval; ref_occ++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
