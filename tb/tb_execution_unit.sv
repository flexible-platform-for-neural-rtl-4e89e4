// tb_execution_unit: the execution unit with a neuron stack bank, fed
// directly with fired instructions from two queues standing in for the two
// preprocessor units. Unit 0 mixes arithmetic with SIGP / POPD pairs on one
// neuron stack, unit 1 runs arithmetic only; each instruction has 0 to 4
// destinations. Checks, per unit and in order, the value and destination of
// every result token (one per destination, copies on consecutive cycles
// when nothing stalls), that an instruction with no destination produces
// nothing, that the units alternate when both wait, and stalls from refused
// stack grants and a full communication unit.
module tb_execution_unit;
  import ndf_pkg::*;
  import ndf_ref_pkg::*;
  localparam int unsigned NSTK = 8;
  logic clk = 0, rst_n = 0, init = 0;
  logic fop_valid [2], fop_take [2];
  fired_t fop [2];
  logic stk_req, stk_push, stk_gnt, stk_err, res_wr, res_space;
  logic [$clog2(NSTK)-1:0] stk_idx;
  value_t stk_wdata, stk_rdata;
  token_t res_tok;
  exe_events_t ev;
  logic [2:0] level;
  bit allow_stk = 1, allow_space = 1;
  int checks = 0, failures = 0, cyc = 0;
  int n_copy = 0, n_confl = 0, n_swait = 0, n_alt = 0, n_sink = 0;
  logic last_take_u, have_last = 0;

  execution_unit #(.NSTK(NSTK)) dut (.*);
  neuron_stack_bank #(.NSTK(NSTK), .D_MAX(2)) u_stk (.clk, .rst_n, .init,
    .req(stk_req && stk_gnt), .push(stk_push), .idx(stk_idx), .wdata(stk_wdata),
    .rdata(stk_rdata), .err(stk_err), .level(level));
  assign stk_gnt   = stk_req && allow_stk;
  assign res_space = allow_space;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  fired_t inq [2][$];     // instructions to offer, per unit
  token_t expq [2][$];    // expected result tokens, per unit (mvb[7] = unit)

  always @(negedge clk) begin
    for (int u = 0; u < 2; u++) begin
      fop_valid[u] <= rst_n && (inq[u].size() > 0);
      if (inq[u].size() > 0) fop[u] <= inq[u][0];
    end
    allow_stk   <= ($urandom_range(0, 3) != 0);
    allow_space <= ($urandom_range(0, 4) != 0);
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (res_wr) begin
        int u;
        u = int'(res_tok.mvb[7]);
        check(expq[u].size() > 0, "result expected");
        if (expq[u].size() > 0) begin
          check(res_tok == expq[u][0], $sformatf("unit %0d result v=%0d (expected %0d)",
                                                 u, res_tok.v, expq[u][0].v));
          void'(expq[u].pop_front());
        end
      end
      for (int u = 0; u < 2; u++) if (fop_take[u]) begin
        if (inq[u][0].ins.ndest == 0) n_sink++;
        void'(inq[u].pop_front());
      end
      if (ev.operate && fop_valid[0] && fop_valid[1]) begin
        // served unit is the one other than the last served
        if (have_last) begin
          check(dut.cur != last_take_u, "units alternate when both wait");
          n_alt++;
        end
      end
      if (ev.operate) begin last_take_u = dut.cur; have_last = 1; end
      n_copy  += ev.copy;
      n_confl += ev.conflict;
      n_swait += ev.stk_wait;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint stk_model [$];
    for (int n = 0; n < 400; n++) begin
      for (int u = 0; u < 2; u++) begin
        fired_t f;
        longint r;
        int kind;
        f = '0;
        f.p = 1'($urandom); f.t = dtype_e'($urandom_range(0, 3));
        f.a = value_t'($urandom_range(0, 2047)) - 16'sd1024;
        f.b = value_t'($urandom_range(0, 2047)) - 16'sd1024;
        f.mvb = {1'(u), 7'(n)};
        f.ins.ndest = NDSTW'($urandom_range(0, 4));
        for (int d = 0; d < NDST; d++) f.ins.dst[d] = dest_t'($urandom);
        kind = $urandom_range(0, 5);
        if (u == 0 && kind == 4 && stk_model.size() < 4) begin
          f.ins.op = OP_SIGP; f.ins.imm = 3;
          r = rsig(f.a);
          stk_model.push_back(r);
        end else if (u == 0 && kind == 5 && stk_model.size() > 0) begin
          f.ins.op = OP_POPD; f.ins.imm = 3;
          r = rdelta(f.a, stk_model.pop_front());
        end else begin
          f.ins.imm = value_t'($urandom_range(0, 511)) - 16'sd256;
          case (kind % 4)
            0: begin f.ins.op = OP_ADD;  r = clamp(longint'(f.a) + f.b); end
            1: begin f.ins.op = OP_SUB;  r = clamp(longint'(f.a) - f.b); end
            2: begin f.ins.op = OP_MULI; r = rmul(f.a, f.ins.imm); end
            default: begin f.ins.op = OP_COPY; r = f.a; end
          endcase
        end
        inq[u].push_back(f);
        for (int d = 0; d < int'(f.ins.ndest); d++) begin
          token_t t;
          t.p = f.p; t.t = f.t; t.v = value_t'(r); t.mvb = f.mvb; t.dst = f.ins.dst[d];
          expq[u].push_back(t);
        end
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while ((inq[0].size() > 0 || inq[1].size() > 0) && cyc < 40000) @(posedge clk);
    repeat (5) @(posedge clk);
    check(expq[0].size() == 0 && expq[1].size() == 0, "all results issued");
    check(!stk_err, "no stack error");
    check(n_copy > 0 && n_confl > 0 && n_swait > 0 && n_alt > 0 && n_sink > 0,
          $sformatf("mechanisms copy=%0d conflict=%0d stk_wait=%0d alternate=%0d sink=%0d",
                    n_copy, n_confl, n_swait, n_alt, n_sink));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
