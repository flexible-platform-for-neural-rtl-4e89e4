// tb_preprocessor_unit: one preprocessor unit with a frame store and an
// instruction store. Random single-input tokens and operand pairs (each pair
// in its own matching vector, either operand first) are offered while the
// frame-store grant and the execution unit's fop_take are refused at
// random. Every fired instruction in FOP is compared with the expected
// operands (ordered by port), context and fetched instruction, in order;
// a stored first operand must not reach FOP; a token loaded at one edge is
// in FOP two edges later when nothing stalls; init empties the unit.
module tb_preprocessor_unit;
  import ndf_pkg::*;
  localparam int unsigned FSD = 64, ISD = 16;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, free;
  token_t in_tok;
  logic fs_req, fs_gnt, fs_hit, fop_valid, fop_take, idle;
  logic [$clog2(FSD)-1:0] fs_addr;
  value_t fs_wval, fs_partner;
  logic [$clog2(ISD)-1:0] is_addr;
  instr_t is_instr, prog [ISD];
  fired_t fop;
  pre_events_t ev;
  logic is_we = 0;
  logic [$clog2(ISD)-1:0] is_waddr = '0;
  instr_t is_wdata = '0;
  logic [$clog2(FSD):0] fs_occ;
  logic [$clog2(ISD)-1:0] ra [1];
  instr_t rd [1];
  bit allow_fs = 1, allow_take = 1;
  int checks = 0, failures = 0, cyc = 0, n_fired = 0, n_store = 0, n_wait = 0;
  fired_t expq [$];

  preprocessor_unit #(.FS_DEPTH(FSD), .IS_DEPTH(ISD)) dut (.*);
  frame_store #(.DEPTH(FSD)) u_fs (.clk, .rst_n, .init, .req(fs_req && fs_gnt), .addr(fs_addr),
    .wval(fs_wval), .hit(fs_hit), .partner(fs_partner), .occupancy(fs_occ));
  assign ra[0] = is_addr;
  assign is_instr = rd[0];
  instruction_store #(.DEPTH(ISD), .NRD(1)) u_is (.clk, .we(is_we), .waddr(is_waddr),
    .wdata(is_wdata), .raddr(ra), .rdata(rd));
  assign fs_gnt   = fs_req && allow_fs;
  assign fop_take = fop_valid && allow_take;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && fop_take) begin
      n_fired++;
      check(expq.size() > 0, "fired instruction expected");
      if (expq.size() > 0) begin
        check(fop == expq[0], $sformatf("fired instruction %0d (a=%0d b=%0d)", n_fired, fop.a, fop.b));
        void'(expq.pop_front());
      end
    end
    if (rst_n) begin n_store += ev.match_store; n_wait += ev.fs_wait; end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fired_t fired(input token_t t, input value_t a, input value_t b);
    fired_t f;
    f.p = t.p; f.t = t.t; f.a = a; f.b = b; f.mvb = t.mvb; f.ins = prog[t.dst.ip];
    return f;
  endfunction

  task automatic send(input token_t t, output int at);
    @(negedge clk);
    in_valid = 1; in_tok = t;
    @(posedge clk);
    while (!free) @(posedge clk);
    at = cyc;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int t0, t1;
    token_t t, t2;
    in_tok = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < ISD; a++) begin
      logic [$bits(instr_t)-1:0] bits;
      for (int k = 0; k < $bits(instr_t); k += 32) bits = {bits, $urandom};
      prog[a] = instr_t'(bits);
      @(negedge clk); is_we = 1; is_waddr = 4'(a); is_wdata = prog[a];
    end
    @(negedge clk) is_we = 0;

    // latency, no stalls
    t = '0; t.v = 16'sd77; t.dst.ip = 5;
    expq.push_back(fired(t, 77, 0));
    send(t, t0);
    // send returns just after the loading edge; count the edges until FOP
    t1 = 0;
    while (!fop_valid && t1 < 10) begin @(negedge clk); t1++; end
    check(t1 == 2, $sformatf("in FOP %0d edges after loading", t1));
    repeat (3) @(posedge clk);

    // random traffic with stalls
    fork
      for (int n = 0; n < 300; n++) begin
        t = token_t'({$urandom, $urandom});
        t.dst.host = 0;
        t.dst.ip = IPW'($urandom_range(0, ISD - 1));
        if ($urandom_range(0, 1)) begin
          t.dst.dyadic = 0;
          expq.push_back(fired(t, t.v, 0));
          send(t, t0);
        end else begin
          t.dst.dyadic = 1;
          t.mvb = MVBW'(n % 60); t.dst.ix = 0;
          t2 = t; t2.dst.port = ~t.dst.port; t2.v = value_t'($urandom);
          // fired with the context of the second token, operands by port
          if (t2.dst.port) expq.push_back(fired(t2, t.v, t2.v));
          else             expq.push_back(fired(t2, t2.v, t.v));
          send(t, t0);
          send(t2, t0);
        end
      end
      for (int n = 0; n < 2500; n++) begin
        @(negedge clk);
        allow_fs   = ($urandom_range(0, 3) != 0);
        allow_take = ($urandom_range(0, 3) != 0);
      end
    join_any
    disable fork;
    allow_fs = 1; allow_take = 1;
    repeat (20) @(posedge clk);
    check(expq.size() == 0, "every expected instruction fired");
    check(n_store > 0 && n_wait > 0, "operands stored and frame-store waits seen");
    check(idle && fs_occ == 0, "unit idle and frame store empty");

    // init drops a waiting token
    allow_take = 0;
    t = '0; t.dst.ip = 1;
    send(t, t0);
    repeat (4) @(posedge clk);
    check(fop_valid, "instruction waiting in FOP");
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    check(idle && !fop_valid, "init emptied the unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
