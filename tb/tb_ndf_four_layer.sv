// tb_ndf_four_layer: pipelined learning of a four-layer network on the
// Neural DF machine at its default size, to show the neuron stacks at the
// depth the architecture is sized for (D_MAX = 3).
//
// The network is a chain of one neuron per layer: input (depth 3), hidden
// h1 (depth 2), hidden h2 (depth 1) and output (depth 0), 20 instructions:
//   forward : x -> PUSH(stack 0) -> *W1 -> SIGP(1) -> *W2 -> SIGP(2)
//             -> *W3 -> SIGP(3) -> host
//   backward: target - o -> POPD(3) -> *W3 -> POPD(2) -> *W2 -> POPD(1)
//             -> delta_h1 * POP(0) -> *ETA -> + ALPHA * POP(4) -> host
//                                             the sum also -> PUSH(4)
// The last steps are the weight change of the first synapse,
//   dw(t+1) = eta * delta_j * o_i + alpha * dw(t),
// using the input value that waited on the deepest stack. The previous
// change dw(t) is kept between patterns on stack 4, which starts with one
// zero; each pattern pops it and pushes the new one. Writing the new weight
// back is not part of the graph: the weights stay immediates.
//
// Patterns enter one every SPACING cycles (default 24, override with
// +spacing=N), each in its own matching vector. The host answers each output
// with its target. Every output, the three deltas and the weight change are
// compared with a reference computed here. The weight change depends on all
// earlier patterns, so the chain through stack 4 must keep pattern order:
// below about 24 cycles a pattern pops dw(t) before the previous one pushed
// it, and patterns start to overtake each other. The test also records the
// largest fill level of each neuron's stack and checks that:
// - no stack error occurred;
// - every level stayed within the capacity 2 * D_MAX;
// - a deeper neuron never needed fewer entries than a shallower one;
// - the input neuron held more than the 2 entries a depth-1 neuron is sized for.
// The levels are printed against the 2d rule.
module tb_ndf_four_layer;
  import ndf_pkg::*;
  import ndf_ref_pkg::*;
  localparam int unsigned N_CP = 4, D_MAX = 3;
  localparam int NPAT = 40;
  localparam longint W1 = 384, W2 = -320, W3 = 448;  // 1.5, -1.25, 1.75
  localparam longint ETA = 64, ALPHA = 192;           // 0.25, 0.75

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

  neural_df dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // largest fill level of the stacks of the four neurons (stack number = layer)
  int max_lvl [4];
  int n_err = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int s = 0; s < 4; s++)
        if (int'(dut.u_stk.cnt[s]) > max_lvl[s]) max_lvl[s] = int'(dut.u_stk.cnt[s]);
      n_err += stk_err;
    end
  end

  // host: injection queue and result capture
  token_t inj_q [$];
  token_t res_q [$];
  always @(negedge clk) begin
    inj_valid <= (inj_q.size() > 0);
    if (inj_q.size() > 0) inj_tok <= inj_q[0];
    res_ready <= 1'b1;
  end
  always @(posedge clk) begin
    if (rst_n && inj_valid && inj_ready) void'(inj_q.pop_front());
    if (rst_n && res_valid && res_ready) res_q.push_back(res_tok);
  end

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

  // mk_dest(host, dyadic, port, ip, ix, bwd)
  task automatic load_program();
    load(0,  mk(OP_PUSH, 1, 0,  mk_dest(0, 0, 0, 1, 0)));
    load(1,  mk(OP_MULI, 1, W1, mk_dest(0, 0, 0, 2, 0)));
    load(2,  mk(OP_SIGP, 1, 1,  mk_dest(0, 0, 0, 3, 0)));
    load(3,  mk(OP_MULI, 1, W2, mk_dest(0, 0, 0, 4, 0)));
    load(4,  mk(OP_SIGP, 1, 2,  mk_dest(0, 0, 0, 5, 0)));
    load(5,  mk(OP_MULI, 1, W3, mk_dest(0, 0, 0, 6, 0)));
    load(6,  mk(OP_SIGP, 2, 3,  mk_dest(1, 0, 0, 6, 0), mk_dest(0, 1, 1, 7, 0, 1)));
    load(7,  mk(OP_SUB,  1, 0,  mk_dest(0, 0, 0, 8, 0, 1)));
    load(8,  mk(OP_POPD, 2, 3,  mk_dest(1, 0, 0, 8, 0), mk_dest(0, 0, 0, 9, 0, 1)));
    load(9,  mk(OP_MULI, 1, W3, mk_dest(0, 0, 0, 10, 0, 1)));
    load(10, mk(OP_POPD, 2, 2,  mk_dest(1, 0, 0, 10, 0), mk_dest(0, 0, 0, 11, 0, 1)));
    load(11, mk(OP_MULI, 1, W2, mk_dest(0, 0, 0, 12, 0, 1)));
    load(12, mk(OP_POPD, 3, 1,  mk_dest(1, 0, 0, 12, 0), mk_dest(0, 1, 0, 14, 1, 1),
                                mk_dest(0, 0, 0, 13, 0, 1)));
    load(13, mk(OP_POP,  1, 0,  mk_dest(0, 1, 1, 14, 1, 1)));
    load(14, mk(OP_MUL,  1, 0,  mk_dest(0, 0, 0, 15, 0, 1)));
    load(15, mk(OP_MULI, 2, ETA, mk_dest(0, 1, 0, 17, 2, 1), mk_dest(0, 0, 0, 16, 0, 1)));
    load(16, mk(OP_POP,  1, 4,   mk_dest(0, 0, 0, 18, 0, 1)));
    load(18, mk(OP_MULI, 1, ALPHA, mk_dest(0, 1, 1, 17, 2, 1)));
    load(17, mk(OP_ADD,  2, 0,   mk_dest(1, 0, 0, 17, 0), mk_dest(0, 0, 0, 19, 0, 1)));
    load(19, mk(OP_PUSH, 0, 4,   '0));
  endtask

  longint x [NPAT], tg [NPAT], h1 [NPAT], h2 [NPAT], o [NPAT];
  longint d_o [NPAT], d_2 [NPAT], d_1 [NPAT], dw [NPAT];
  longint prev_dw = 0;
  int nres_got [NPAT];

  task automatic reference(input int p);
    h1[p]  = rsig(rmul(x[p], W1));
    h2[p]  = rsig(rmul(h1[p], W2));
    o[p]   = rsig(rmul(h2[p], W3));
    d_o[p] = rdelta(clamp(tg[p] - o[p]), o[p]);
    d_2[p] = rdelta(rmul(d_o[p], W3), h2[p]);
    d_1[p] = rdelta(rmul(d_2[p], W2), h1[p]);
    dw[p]  = clamp(rmul(rmul(d_1[p], x[p]), ETA) + rmul(prev_dw, ALPHA));
    prev_dw = dw[p];
  endtask

  function automatic token_t tk(input longint v, input int mvb, input dest_t d, input bit p = 0);
    token_t t;
    t = '0; t.v = value_t'(v); t.mvb = MVBW'(mvb); t.dst = d; t.p = p;
    return t;
  endfunction

  initial begin
    int spacing, nres;
    token_t r;
    if (!$value$plusargs("spacing=%d", spacing)) spacing = 24;
    for (int s = 0; s < 4; s++) max_lvl[s] = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program();
    for (int p = 0; p < NPAT; p++) begin
      x[p]  = $urandom_range(0, 1024) - 512;
      tg[p] = $urandom_range(0, 256);
      nres_got[p] = 0;
      reference(p);
    end
    inj_q.push_back(tk(0, 0, mk_dest(0, 0, 0, 19, 0, 1)));  // dw(0) = 0 on stack 4
    repeat (10) @(posedge clk);
    nres = 0;
    fork
      for (int k = 0; k < NPAT; k++) begin
        inj_q.push_back(tk(x[k], k * 4, mk_dest(0, 0, 0, 0, 0)));
        repeat (spacing) @(posedge clk);
      end
      while (nres < 5 * NPAT && cyc < 90000) begin
        @(posedge clk);
        while (res_q.size() > 0) begin
          int k;
          r = res_q.pop_front();
          k = int'(r.mvb) / 4;
          nres++;
          nres_got[k]++;
          case (r.dst.ip)
            6: begin
              check(longint'(r.v) == o[k], $sformatf("output %0d: %0d vs %0d", k, longint'(r.v), o[k]));
              inj_q.push_back(tk(tg[k], k * 4, mk_dest(0, 1, 0, 7, 0, 1), 1'b1));
            end
            8:  check(longint'(r.v) == d_o[k], $sformatf("output delta %0d: %0d vs %0d", k, longint'(r.v), d_o[k]));
            10: check(longint'(r.v) == d_2[k], $sformatf("h2 delta %0d: %0d vs %0d", k, longint'(r.v), d_2[k]));
            12: check(longint'(r.v) == d_1[k], $sformatf("h1 delta %0d: %0d vs %0d", k, longint'(r.v), d_1[k]));
            17: check(longint'(r.v) == dw[k], $sformatf("weight change %0d: %0d vs %0d", k, longint'(r.v), dw[k]));
            default: check(0, "unexpected result tag");
          endcase
        end
      end
    join
    check(nres == 5 * NPAT, $sformatf("all results (%0d of %0d)", nres, 5 * NPAT));
    for (int k = 0; k < NPAT; k++) check(nres_got[k] == 5, $sformatf("five results of pattern %0d", k));
    repeat (20) @(posedge clk);
    check(idle && fs_waiting == 0, "machine empty at the end");
    check(n_err == 0, "no stack error");
    check(dut.u_stk.cnt[4] == 1, "one weight change left on stack 4");
    begin
      int nz = 0;
      for (int k = 0; k < NPAT; k++) nz += (dw[k] != 0 && d_1[k] != 0);
      check(nz >= NPAT / 4, $sformatf("nonzero weight changes compared (%0d)", nz));
    end
    for (int s = 0; s < 4; s++) begin
      $display("stack of the depth-%0d neuron: at most %0d entries (2d = %0d, built %0d)",
               3 - s, max_lvl[s], 2 * (3 - s), 2 * D_MAX);
      check(max_lvl[s] <= 2 * D_MAX, "stack level within capacity");
    end
    check(max_lvl[0] >= max_lvl[1] && max_lvl[1] >= max_lvl[2],
          "a deeper neuron holds at least as many outputs");
    check(max_lvl[0] > 2, "deepest stack held more than a depth-1 neuron needs");
    $display("patterns=%0d spacing=%0d cycles=%0d", NPAT, spacing, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
