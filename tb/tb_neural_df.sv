// tb_neural_df: end-to-end test of the Neural DF machine at its default
// size (4 coordinating processors), running a 2-2-1 logistic network
// mapped onto a data flow graph of 20 instructions.
//
// Phase 1, recall: 40 input patterns are injected as fast as the machine
// takes them, each in its own matching vector (MVB = 16 * frame), with the
// host sometimes refusing results so the processors back up. Every output
// is compared with a reference forward pass computed here.
// Phase 2, learning: the hidden and output neurons are reloaded as SIGP
// (output pushed on the neuron's stack) and the backward part of the graph
// is used. Patterns are injected every few cycles so several are in flight;
// when the output of a pattern arrives the host answers with its target,
// and the output delta and both hidden deltas, e * o * (1 - o), are
// compared with the reference (the stacks must return forward outputs in
// pattern order).
// Phase 3: a neuron stack is pushed past its capacity 2 * D_MAX (error
// flag), then init clears the machine.
// Each mechanism must have happened: bypass of matching, operand stored,
// operand matched, frame-store wait, copy, stack push / pop / wait, use of
// the backward preprocessor unit, both units of a CP competing for its
// execution unit, own-CP loopback, network transfer, DQU put and get,
// stack error, init.
module tb_neural_df;
  import ndf_pkg::*;
  import ndf_ref_pkg::*;
  localparam int unsigned N_CP = 4, D_MAX = 3;
  localparam int NPAT1 = 40, NPAT2 = 24;

  logic clk = 0, rst_n = 0, init = 0;
  logic is_we = 0;
  logic [7:0] is_waddr = '0;
  instr_t is_wdata = '0;
  logic inj_valid, inj_ready, res_valid, res_ready, idle, ev_dq_put, ev_dq_get, stk_err;
  token_t inj_tok, res_tok;
  cp_events_t cp_ev [N_CP];
  logic [N_CP-1:0] ev_loop, ev_net;
  logic [8:0] fs_waiting;
  logic [7:0] dq_waiting;
  int max_dq = 0;

  neural_df dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_bypass, n_store, n_hit, n_fswait, n_copy, n_push, n_pop, n_stkwait;
  int n_loop, n_net, n_put, n_get, n_err, n_init, n_bwd, n_confl;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int i = 0; i < N_CP; i++) begin
        for (int u = 0; u < 2; u++) begin
          n_bypass  += cp_ev[i].pre[u].bypass;
          n_store   += cp_ev[i].pre[u].match_store;
          n_hit     += cp_ev[i].pre[u].match_hit;
          n_fswait  += cp_ev[i].pre[u].fs_wait;
        end
        n_bwd     += cp_ev[i].pre[1].load;
        n_copy    += cp_ev[i].exe.copy;
        n_push    += cp_ev[i].exe.stk_push;
        n_pop     += cp_ev[i].exe.stk_pop;
        n_stkwait += cp_ev[i].exe.stk_wait;
        n_confl   += cp_ev[i].exe.conflict;
      end
      n_loop += $countones(ev_loop);
      n_net  += $countones(ev_net);
      n_put  += ev_dq_put;
      n_get  += ev_dq_get;
      n_err  += stk_err;
      n_init += init;
      if (int'(dq_waiting) > max_dq) max_dq = int'(dq_waiting);
    end
  end

  // ---------------- host: injection queue and result capture ----------------
  token_t inj_q [$];
  token_t res_q [$];
  bit     rand_res_ready = 0;
  always @(negedge clk) begin
    inj_valid <= (inj_q.size() > 0);
    if (inj_q.size() > 0) inj_tok <= inj_q[0];
    res_ready <= rand_res_ready ? ($urandom_range(0, 99) < 60) : 1'b1;
  end
  always @(posedge clk) begin
    if (rst_n && inj_valid && inj_ready) void'(inj_q.pop_front());
    if (rst_n && res_valid && res_ready) res_q.push_back(res_tok);
  end

  // ---------------- network and reference ----------------
  localparam longint W00 = 128, W01 = -192, W10 = 320, W11 = 64;  // input -> hidden
  localparam longint V0 = 384, V1 = -256;                          // hidden -> output

  function automatic instr_t mk(input opcode_e op, input int nd, input longint imm,
                                input dest_t d0 = '0, input dest_t d1 = '0,
                                input dest_t d2 = '0);
    instr_t i;
    i = '0;
    i.op = op; i.ndest = NDSTW'(nd); i.imm = value_t'(imm);
    i.dst[0] = d0; i.dst[1] = d1; i.dst[2] = d2;
    return i;
  endfunction

  task automatic load(input int a, input instr_t i);
    @(negedge clk);
    is_we = 1; is_waddr = 8'(a); is_wdata = i;
    @(negedge clk);
    is_we = 0;
  endtask

  task automatic load_program(input bit learn);
    dest_t none;
    none = '0;
    load(0,  mk(OP_COPY, 2, 0, mk_dest(0, 0, 0, 2, 0), mk_dest(0, 0, 0, 3, 0)));
    load(1,  mk(OP_COPY, 2, 0, mk_dest(0, 0, 0, 4, 0), mk_dest(0, 0, 0, 5, 0)));
    load(2,  mk(OP_MULI, 1, W00, mk_dest(0, 1, 0, 6, 0)));
    load(3,  mk(OP_MULI, 1, W10, mk_dest(0, 1, 0, 7, 1)));
    load(4,  mk(OP_MULI, 1, W01, mk_dest(0, 1, 1, 6, 0)));
    load(5,  mk(OP_MULI, 1, W11, mk_dest(0, 1, 1, 7, 1)));
    load(6,  mk(OP_ADD, 1, 0, mk_dest(0, 0, 0, 8, 0)));
    load(7,  mk(OP_ADD, 1, 0, mk_dest(0, 0, 0, 9, 0)));
    load(8,  mk(learn ? OP_SIGP : OP_SIG, 1, 0, mk_dest(0, 0, 0, 10, 0)));
    load(9,  mk(learn ? OP_SIGP : OP_SIG, 1, 1, mk_dest(0, 0, 0, 11, 0)));
    load(10, mk(OP_MULI, 1, V0, mk_dest(0, 1, 0, 12, 2)));
    load(11, mk(OP_MULI, 1, V1, mk_dest(0, 1, 1, 12, 2)));
    load(12, mk(OP_ADD, 1, 0, mk_dest(0, 0, 0, 13, 0)));
    if (learn)
      load(13, mk(OP_SIGP, 2, 2, mk_dest(1, 0, 0, 13, 0), mk_dest(0, 1, 1, 14, 3, 1)));
    else
      load(13, mk(OP_SIG, 1, 0, mk_dest(1, 0, 0, 13, 0)));
    // backward part: every destination is in the backward phase (last bit)
    load(14, mk(OP_SUB, 1, 0, mk_dest(0, 0, 0, 15, 0, 1)));
    load(15, mk(OP_POPD, 3, 2, mk_dest(1, 0, 0, 15, 0), mk_dest(0, 0, 0, 16, 0, 1),
                                mk_dest(0, 0, 0, 17, 0, 1)));
    load(16, mk(OP_MULI, 1, V0, mk_dest(0, 0, 0, 18, 0, 1)));
    load(17, mk(OP_MULI, 1, V1, mk_dest(0, 0, 0, 19, 0, 1)));
    load(18, mk(OP_POPD, 1, 0, mk_dest(1, 0, 0, 18, 0)));
    load(19, mk(OP_POPD, 1, 1, mk_dest(1, 0, 0, 19, 0)));
    load(20, mk(OP_PUSH, 0, 7, none));
  endtask

  longint x0 [64], x1 [64], tg [64], h0 [64], h1 [64], o [64];
  longint d_o [64], d_h0 [64], d_h1 [64];
  bit started [64];
  int nres_got [64];
  int max_inflight = 0;

  task automatic reference(input int p);
    h0[p] = rsig(clamp(rmul(x0[p], W00) + rmul(x1[p], W01)));
    h1[p] = rsig(clamp(rmul(x0[p], W10) + rmul(x1[p], W11)));
    o[p]  = rsig(clamp(rmul(h0[p], V0) + rmul(h1[p], V1)));
    d_o[p]  = rdelta(clamp(tg[p] - o[p]), o[p]);
    d_h0[p] = rdelta(rmul(d_o[p], V0), h0[p]);
    d_h1[p] = rdelta(rmul(d_o[p], V1), h1[p]);
  endtask

  function automatic token_t tk(input longint v, input int mvb, input dest_t d, input bit p = 0);
    token_t t;
    t = '0; t.v = value_t'(v); t.mvb = MVBW'(mvb); t.dst = d; t.p = p;
    return t;
  endfunction

  task automatic wait_idle(input int max_cycles);
    int k = 0;
    while ((!idle || inj_q.size() > 0) && k < max_cycles) begin @(posedge clk); k++; end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    int done1 [64];
    int got, p, nres;
    token_t r;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ================= phase 1: recall, heavy load =================
    load_program(0);
    for (p = 0; p < NPAT1; p++) begin
      x0[p] = $urandom_range(0, 1536) - 768;
      x1[p] = $urandom_range(0, 1536) - 768;
      tg[p] = $urandom_range(0, 256);
      reference(p);
      done1[p] = 0;
    end
    rand_res_ready = 1;
    got = 0;
    p = 0;
    while (got < NPAT1 && cyc < 100000) begin
      // a frame (16 items) is reused only after its earlier pattern finished
      while (p < NPAT1 && (p < 16 || done1[p - 16])) begin
        inj_q.push_back(tk(x0[p], (p % 16) * 16, mk_dest(0, 0, 0, 0, 0), p[0]));
        inj_q.push_back(tk(x1[p], (p % 16) * 16, mk_dest(0, 0, 0, 1, 0), p[1]));
        p++;
      end
      @(posedge clk);
      while (res_q.size() > 0) begin
        int q;
        r = res_q.pop_front();
        // the pattern in this frame is the oldest unfinished one using it
        q = int'(r.mvb) / 16;
        while (done1[q]) q += 16;
        check(r.dst.ip == 13, "recall result tag");
        check(longint'(r.v) == o[q], $sformatf("recall output of pattern %0d: %0d vs %0d",
                                               q, r.v, o[q]));
        done1[q] = 1;
        got++;
      end
    end
    check(got == NPAT1, "all recall outputs");
    rand_res_ready = 0;
    wait_idle(1000);
    check(idle && fs_waiting == 0, "machine empty after recall");

    // ================= phase 2: learning, pipelined patterns =================
    load_program(1);
    for (p = 0; p < NPAT2; p++) begin
      x0[p] = $urandom_range(0, 1536) - 768;
      x1[p] = $urandom_range(0, 1536) - 768;
      tg[p] = $urandom_range(0, 256);
      reference(p);
    end
    nres = 0;
    for (int k = 0; k < 64; k++) begin started[k] = 0; nres_got[k] = 0; end
    fork
      begin : inflight
        // patterns injected but not yet complete (4 results each)
        forever begin
          int n_in;
          @(negedge clk);
          n_in = 0;
          for (int k = 0; k < NPAT2; k++)
            if (started[k] && nres_got[k] < 4) n_in++;
          if (n_in > max_inflight) max_inflight = n_in;
        end
      end
      begin
        for (int k = 0; k < NPAT2; k++) begin
          inj_q.push_back(tk(x0[k], k * 8, mk_dest(0, 0, 0, 0, 0)));
          inj_q.push_back(tk(x1[k], k * 8, mk_dest(0, 0, 0, 1, 0)));
          started[k] = 1;
          repeat (16) @(posedge clk);
        end
      end
      begin
        while (nres < 4 * NPAT2 && cyc < 150000) begin
          @(posedge clk);
          while (res_q.size() > 0) begin
            int k;
            r = res_q.pop_front();
            k = int'(r.mvb) / 8;
            nres++;
            nres_got[k]++;
            case (r.dst.ip)
              13: begin
                check(longint'(r.v) == o[k], $sformatf("learn output %0d", k));
                inj_q.push_back(tk(tg[k], k * 8, mk_dest(0, 1, 0, 14, 3, 1), 1'b1));
              end
              15: check(longint'(r.v) == d_o[k],
                        $sformatf("output delta %0d: %0d vs %0d", k, r.v, d_o[k]));
              18: check(longint'(r.v) == d_h0[k],
                        $sformatf("hidden delta 0 of %0d: %0d vs %0d", k, r.v, d_h0[k]));
              19: check(longint'(r.v) == d_h1[k],
                        $sformatf("hidden delta 1 of %0d: %0d vs %0d", k, r.v, d_h1[k]));
              default: check(0, "unexpected result tag");
            endcase
          end
        end
      end
    join_any
    wait (nres >= 4 * NPAT2 || cyc >= 150000);
    disable inflight;
    check(nres == 4 * NPAT2, "all learning results");
    check(max_inflight >= 2, $sformatf("patterns overlap in the pipeline (max %0d)", max_inflight));
    $display("learning: up to %0d patterns in flight", max_inflight);
    wait_idle(1000);
    check(!stk_err && n_err == 0, "no stack error while learning");

    // ================= phase 3: stack overflow, init =================
    for (int k = 0; k < 2 * D_MAX + 1; k++)
      inj_q.push_back(tk(k, 0, mk_dest(0, 0, 0, 20, 0)));
    wait_idle(1000);
    check(n_err == 1, "push beyond capacity 2*D_MAX flagged once");
    inj_q.push_back(tk(1, 0, mk_dest(0, 1, 0, 14, 3, 1)));   // operand left waiting
    wait_idle(100);
    check(fs_waiting == 1, "operand waiting in the frame store");
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    check(fs_waiting == 0 && idle, "init cleared the machine");

    $display("            backward-unit loads=%0d both units ready=%0d", n_bwd, n_confl);
    $display("mechanisms: bypass=%0d store=%0d hit=%0d fs_wait=%0d copy=%0d push=%0d pop=%0d stk_wait=%0d",
             n_bypass, n_store, n_hit, n_fswait, n_copy, n_push, n_pop, n_stkwait);
    $display("            loop=%0d net=%0d dq_put=%0d dq_get=%0d max_dq=%0d stk_err=%0d init=%0d cycles=%0d",
             n_loop, n_net, n_put, n_get, max_dq, n_err, n_init, cyc);
    check(n_bypass > 0, "bypass happened");      check(n_store > 0, "store happened");
    check(n_hit > 0, "match happened");          check(n_fswait > 0, "FS wait happened");
    check(n_copy > 0, "copy happened");          check(n_push > 0, "push happened");
    check(n_pop > 0, "pop happened");            check(n_stkwait > 0, "stack wait happened");
    check(n_loop > 0, "loopback happened");      check(n_net > 0, "network transfer happened");
    check(n_put > 0, "DQU put happened");        check(n_get > 0, "DQU get happened");
    check(n_err > 0, "stack error happened");
    check(n_bwd > 0, "backward unit used");      check(n_confl > 0, "both units competed");    check(n_init > 0, "init happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
