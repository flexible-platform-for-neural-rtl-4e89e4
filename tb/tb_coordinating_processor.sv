// tb_coordinating_processor: one coordinating processor with its own frame
// store, instruction store and neuron stack bank. Checks:
//  - a single-input token, through either preprocessor unit, is taken off
//    CP.DO 4 clock edges after the edge that loads it (L, M, F, O, queue);
//  - two-input operands: the first is stored in the frame store, the second
//    completes the pair; the order of the operands follows the input port
//    whichever arrives first;
//  - an instruction with three destinations sends three copies (COPY state)
//    on consecutive cycles while CP_free is low;
//  - SIGP pushes outputs on a neuron stack and POPD pops them oldest first
//    to form e * o * (1 - o);
//  - a random mix of tokens for both preprocessor units, with random
//    refusals of the frame store / stack grants and of out_ready, gives
//    exactly the expected set of results (the units compete for the
//    execution unit);
//  - init empties the pipeline and clears the stored operands.
module tb_coordinating_processor;
  import ndf_pkg::*;
  import ndf_ref_pkg::*;
  localparam int unsigned FSD = 64, ISD = 16, NSTK = 8;

  logic clk = 0, rst_n = 0, init = 0;
  logic in_valid [2], cp_free [2];
  token_t in_tok [2];
  logic fs_req [2], fs_gnt [2];
  logic fs_hit, stk_req, stk_push, stk_gnt, stk_err;
  logic [$clog2(FSD)-1:0] fs_addr [2];
  value_t fs_wval [2];
  value_t fs_partner, stk_wdata, stk_rdata;
  logic [$clog2(ISD)-1:0] is_addr [2];
  instr_t is_instr [2];
  logic [$clog2(NSTK)-1:0] stk_idx;
  logic out_valid, out_ready;
  token_t out_tok;
  cp_events_t ev;
  logic idle;
  logic is_we = 0;
  logic [$clog2(ISD)-1:0] is_waddr = '0;
  instr_t is_wdata;
  logic [1:0] fs_r, fs_g;
  logic [$clog2(FSD):0] fs_occ;
  logic [$clog2(2*2):0] stk_level;
  bit allow_fs = 1, allow_stk = 1, allow_out = 1;

  coordinating_processor #(.FS_DEPTH(FSD), .IS_DEPTH(ISD), .NSTK(NSTK)) dut (.*);
  // the two preprocessor units share the frame store through an arbiter
  assign fs_r = {fs_req[1] && allow_fs, fs_req[0] && allow_fs};
  rr_arbiter #(.N(2)) u_arb (.clk, .rst_n, .req(fs_r), .gnt(fs_g));
  assign fs_gnt[0] = fs_g[0];
  assign fs_gnt[1] = fs_g[1];
  frame_store #(.DEPTH(FSD)) u_fs (.clk, .rst_n, .init, .req(fs_g != 2'b00),
    .addr(fs_g[1] ? fs_addr[1] : fs_addr[0]), .wval(fs_g[1] ? fs_wval[1] : fs_wval[0]),
    .hit(fs_hit), .partner(fs_partner), .occupancy(fs_occ));
  instruction_store #(.DEPTH(ISD), .NRD(2)) u_is (.clk, .we(is_we), .waddr(is_waddr),
    .wdata(is_wdata), .raddr(is_addr), .rdata(is_instr));
  neuron_stack_bank #(.NSTK(NSTK), .D_MAX(2)) u_stk (.clk, .rst_n, .init,
    .req(stk_req && stk_gnt), .push(stk_push), .idx(stk_idx), .wdata(stk_wdata),
    .rdata(stk_rdata), .err(stk_err), .level(stk_level));
  assign stk_gnt   = stk_req && allow_stk;
  assign out_ready = allow_out;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_copy = 0, n_store = 0, n_hit = 0, n_bypass = 0, n_fswait = 0, n_stkwait = 0;
  int n_busy = 0, n_push = 0, n_pop = 0, n_confl = 0;
  token_t got [$];
  int     got_cyc [$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
  end
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin got.push_back(out_tok); got_cyc.push_back(cyc); end
    for (int u = 0; u < 2; u++) begin
      n_store   += ev.pre[u].match_store;
      n_hit     += ev.pre[u].match_hit;
      n_bypass  += ev.pre[u].bypass;
      n_fswait  += ev.pre[u].fs_wait;
      if (!cp_free[u]) n_busy++;
    end
    n_copy    += ev.exe.copy;
    n_stkwait += ev.exe.stk_wait;
    n_push    += ev.exe.stk_push;
    n_pop     += ev.exe.stk_pop;
    n_confl   += ev.exe.conflict;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(input opcode_e op, input int nd, input int imm,
                                input dest_t d0, input dest_t d1 = '0, input dest_t d2 = '0);
    instr_t i;
    i = '0;
    i.op = op; i.ndest = NDSTW'(nd); i.imm = value_t'(imm);
    i.dst[0] = d0; i.dst[1] = d1; i.dst[2] = d2;
    return i;
  endfunction

  function automatic token_t tk(input int v, input int mvb, input dest_t d);
    token_t t;
    t = '0; t.v = value_t'(v); t.mvb = MVBW'(mvb); t.dst = d;
    return t;
  endfunction

  task automatic load(input int a, input instr_t i);
    @(negedge clk);
    is_we = 1; is_waddr = $clog2(ISD)'(a); is_wdata = i;
    @(negedge clk);
    is_we = 0;
  endtask

  // offer a token and wait until the CP takes it; returns the cycle
  // offer a token to the preprocessor unit of its phase
  task automatic send(input token_t t, output int taken_at);
    int u;
    u = int'(t.dst.bwd);
    @(negedge clk);
    in_valid[u] = 1; in_tok[u] = t;
    @(posedge clk);
    while (!cp_free[u]) @(posedge clk);
    taken_at = cyc;
    @(negedge clk);
    in_valid[u] = 0;
  endtask

  task automatic wait_results(input int n);
    int guard = 0;
    while (got.size() < n && guard < 2000) begin @(posedge clk); guard++; end
    check(got.size() >= n, $sformatf("expected %0d results, have %0d", n, got.size()));
  endtask

  initial begin
    int t0, t1;
    token_t r;
    longint ref_o [$];
    longint xs [4] = '{300, -200, 700, 50};
    longint es [4] = '{100, -300, 512, 64};
    in_tok[0] = '0; in_tok[1] = '0; in_valid[0] = 0; in_valid[1] = 0; is_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program
    load(0, mk(OP_MULI, 1, 512, mk_dest(1, 0, 0, 10, 0)));                 // x * 2.0
    load(1, mk(OP_SUB, 3, 0, mk_dest(1, 0, 0, 11, 0), mk_dest(1, 0, 0, 12, 0),
                              mk_dest(1, 0, 0, 13, 0)));                     // a - b, 3 copies
    load(2, mk(OP_SIGP, 1, 5, mk_dest(1, 0, 0, 14, 0)));                   // o = sig(x), push
    load(3, mk(OP_POPD, 1, 5, mk_dest(1, 0, 0, 15, 0)));                   // delta
    repeat (2) @(posedge clk);

    // 1. latency of a single-input token
    send(tk(384, 0, mk_dest(0, 0, 0, 0, 0)), t0);
    wait_results(1);
    r = got.pop_front(); t1 = got_cyc.pop_front();
    check(r.v == value_t'(768) && r.dst.ip == 10 && r.dst.host, "MULI result");
    check(t1 - t0 == 4, $sformatf("latency %0d edges from load to the result being taken", t1 - t0));
    check(n_bypass == 1 && n_store == 0, "single-input token bypasses matching");
    send(tk(-128, 0, mk_dest(0, 0, 0, 0, 0, 1)), t0);
    wait_results(1);
    r = got.pop_front(); t1 = got_cyc.pop_front();
    check(r.v == value_t'(-256), "MULI result through the backward unit");
    check(t1 - t0 == 4, "same latency through the backward unit");

    // 2. two-input operator, left first then right first
    send(tk(1000, 16, mk_dest(0, 1, 0, 1, 3)), t0);
    repeat (6) @(posedge clk);
    check(got.size() == 0 && n_store == 1, "first operand waits in the frame store");
    send(tk(250, 16, mk_dest(0, 1, 1, 1, 3)), t0);
    wait_results(3);
    for (int k = 0; k < 3; k++) begin
      r = got.pop_front(); t1 = got_cyc.pop_front();
      check(r.v == value_t'(750) && r.dst.ip == IPW'(11 + k) && r.mvb == 16, "SUB copies");
      if (k > 0) check(t1 == t0 + 1, "copies on consecutive cycles");
      t0 = t1;
    end
    check(n_copy == 2 && n_hit == 1, "two COPY steps and one match");
    send(tk(40, 32, mk_dest(0, 1, 1, 1, 3)), t0);   // right operand first
    send(tk(10, 32, mk_dest(0, 1, 0, 1, 3)), t0);
    wait_results(3);
    for (int k = 0; k < 3; k++) begin
      r = got.pop_front(); void'(got_cyc.pop_front());
      check(r.v == value_t'(-30), "operand order follows the port");
    end

    // 3. neuron stack: forward outputs pushed, errors pop them oldest first
    for (int k = 0; k < 4; k++) begin
      send(tk(int'(xs[k]), 0, mk_dest(0, 0, 0, 2, 0)), t0);
      ref_o.push_back(rsig(xs[k]));
    end
    wait_results(4);
    for (int k = 0; k < 4; k++) begin
      r = got.pop_front(); void'(got_cyc.pop_front());
      check(longint'(r.v) == ref_o[k], "SIGP output");
    end
    for (int k = 0; k < 4; k++) send(tk(int'(es[k]), 0, mk_dest(0, 0, 0, 3, 0)), t0);
    wait_results(4);
    for (int k = 0; k < 4; k++) begin
      r = got.pop_front(); void'(got_cyc.pop_front());
      check(longint'(r.v) == rdelta(es[k], ref_o[k]),
            $sformatf("POPD delta %0d vs %0d", r.v, rdelta(es[k], ref_o[k])));
    end
    check(n_push == 4 && n_pop == 4 && !stk_err, "stack pushes and pops");

    // 4. stream of mixed tokens with random stalls
    begin
      longint expv [$];
      fork
        begin
          for (int k = 0; k < 200; k++) begin
            int kind, v;
            kind = $urandom_range(0, 2);
            v = $urandom_range(0, 1000) - 500;
            if (kind == 0) begin
              send(tk(v, 0, mk_dest(0, 0, 0, 0, 0, 1'($urandom))), t0);
              expv.push_back(rmul(v, 512));
            end else if (kind == 1) begin
              // forward output pushed, then its error pops it again
              send(tk(v, 0, mk_dest(0, 0, 0, 2, 0)), t0);
              send(tk(v / 2, 0, mk_dest(0, 0, 0, 3, 0)), t0);
              expv.push_back(rsig(v));
              expv.push_back(rdelta(v / 2, rsig(v)));
            end else begin
              // operand pair in its own matching vector
              send(tk(v, k, mk_dest(0, 1, 0, 1, 1, 1'($urandom))), t0);
              send(tk(7, k, mk_dest(0, 1, 1, 1, 1, 1'($urandom))), t0);
              for (int c = 0; c < 3; c++) expv.push_back(longint'(v) - 7);
            end
          end
        end
        begin
          for (int k = 0; k < 3000; k++) begin
            @(negedge clk);
            allow_fs  = ($urandom_range(0, 3) != 0);
            allow_stk = ($urandom_range(0, 3) != 0);
            allow_out = ($urandom_range(0, 4) != 0);
          end
          allow_fs = 1; allow_stk = 1; allow_out = 1;
        end
      join_any
      wait_results(expv.size());
      begin
        longint gotv [$];
        while (got.size() > 0) begin
          r = got.pop_front(); void'(got_cyc.pop_front());
          gotv.push_back(longint'(r.v));
        end
        check(gotv.size() == expv.size(), "stream result count");
        gotv.sort(); expv.sort();
        for (int k = 0; k < expv.size() && k < gotv.size(); k++)
          check(gotv[k] == expv[k], $sformatf("stream result %0d", k));
      end
      wait fork;
    end
    check(n_stkwait > 0 && n_fswait > 0 && n_busy > 0 && n_confl > 0, "stalls exercised");

    // 5. init clears a waiting operand
    send(tk(77, 48, mk_dest(0, 1, 0, 1, 0)), t0);
    repeat (4) @(posedge clk);
    check(fs_occ == 1, "operand waiting before init");
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    check(fs_occ == 0 && idle, "init cleared the frame store and the pipeline");
    send(tk(5, 48, mk_dest(0, 1, 1, 1, 0)), t0);
    repeat (8) @(posedge clk);
    check(got.size() == 0, "no pair formed with an operand from before init");

    $display("events: bypass=%0d store=%0d hit=%0d copy=%0d fs_wait=%0d stk_wait=%0d busy=%0d conflict=%0d",
             n_bypass, n_store, n_hit, n_copy, n_fswait, n_stkwait, n_busy, n_confl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
