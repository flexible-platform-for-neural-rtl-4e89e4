// tb_token_router: drives the interconnection network with random CP
// outputs, CP_free flags of both preprocessor units of every CP, DQU state
// and host requests, and checks the placement rules each cycle: every token
// taken goes to exactly one place, and into a unit of its own phase; only
// free units receive tokens, at most one each; a CP whose unit is free gets
// its own result back; a token left waiting had no free unit of its phase
// and no DQU room; the DQU and then the host refill free units; one DQU
// put, one DQU get and one host result at most per cycle. Every route must
// occur.
module tb_token_router;
  import ndf_pkg::*;
  localparam int unsigned N = 4;
  logic   out_valid [N], out_ready [N];
  logic   cp_free [N][2], in_valid [N][2];
  token_t out_tok [N], in_tok [N][2];
  logic   dq_put, dq_get, dq_get_valid, inj_valid, inj_ready, host_valid, host_ready;
  logic [1:0] dq_room;
  token_t dq_put_tok, dq_get_tok, inj_tok, host_tok;
  logic [N-1:0] ev_loop, ev_net;
  int checks = 0, failures = 0;
  int n_loop = 0, n_net = 0, n_put = 0, n_get = 0, n_inj = 0, n_host = 0, n_wait = 0;
  logic clk = 0;

  token_router #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // number of units holding the token with value v, and whether all of them
  // are of phase u
  function automatic int count_in(input value_t v, input logic u, output bit right_unit);
    int c;
    c = 0; right_unit = 1;
    for (int j = 0; j < N; j++)
      for (int k = 0; k < 2; k++)
        if (in_valid[j][k] && in_tok[j][k].v == v) begin
          c++;
          if (k[0] != u) right_unit = 0;
        end
    return c;
  endfunction

  // a free unit of phase u that got nothing
  function automatic bit free_left(input logic u);
    for (int j = 0; j < N; j++) if (cp_free[j][u] && !in_valid[j][u]) return 1;
    return 0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int places;
      bit ru;
      logic u;
      for (int i = 0; i < N; i++) begin
        out_valid[i] = ($urandom_range(0, 99) < 70);
        out_tok[i]   = token_t'({$urandom, $urandom});
        out_tok[i].v = value_t'(100 + i);          // identifies the source
        out_tok[i].dst.host = ($urandom_range(0, 9) == 0);
        for (int k = 0; k < 2; k++) cp_free[i][k] = ($urandom_range(0, 99) < 45);
      end
      dq_room      = 2'($urandom);
      dq_get_valid = $urandom_range(0, 1);
      dq_get_tok   = token_t'({$urandom, $urandom}); dq_get_tok.v = 200;
      inj_valid    = $urandom_range(0, 1);
      inj_tok      = token_t'({$urandom, $urandom}); inj_tok.v = 300;
      host_ready   = ($urandom_range(0, 3) != 0);
      #1;
      for (int j = 0; j < N; j++)
        for (int k = 0; k < 2; k++)
          check(!in_valid[j][k] || cp_free[j][k], "token only into a free unit");
      for (int i = 0; i < N; i++) begin
        u = out_tok[i].dst.bwd;
        places = count_in(value_t'(100 + i), u, ru);
        check(ru, "token enters a unit of its phase");
        if (dq_put && dq_put_tok.v == value_t'(100 + i)) places++;
        if (host_valid && host_tok.v == value_t'(100 + i)) places++;
        check(places == (out_ready[i] ? 1 : 0), $sformatf("token of CP %0d placed once", i));
        check(!out_ready[i] || out_valid[i], "ready only for a valid token");
        if (out_valid[i] && !out_tok[i].dst.host && cp_free[i][u]) begin
          check(in_valid[i][u] && in_tok[i][u].v == value_t'(100 + i), "own free CP takes its result");
          n_loop++;
        end
        if (out_valid[i] && out_tok[i].dst.host && host_ready) check(host_valid, "host port used");
        if (out_valid[i] && !out_tok[i].dst.host && !out_ready[i]) begin
          n_wait++;
          check(!free_left(u), "waiting token had no free unit");
          check(dq_put || !dq_room[out_tok[i].p], "waiting token had no DQU room");
        end
        if (out_ready[i] && !out_tok[i].dst.host && !(in_valid[i][u] && in_tok[i][u].v == value_t'(100 + i))
            && !(dq_put && dq_put_tok.v == value_t'(100 + i))) n_net++;
      end
      check(!dq_get || dq_get_valid, "get only when a token waits");
      check(!inj_ready || inj_valid, "inject only when offered");
      check(!dq_put || dq_room[dq_put_tok.p], "put only with room");
      places = count_in(200, dq_get_tok.dst.bwd, ru);
      check(places == (dq_get ? 1 : 0) && ru, "DQU token delivered once, to its phase");
      if (dq_get_valid && !dq_get) check(!free_left(dq_get_tok.dst.bwd), "free unit refilled from the DQU");
      places = count_in(300, inj_tok.dst.bwd, ru);
      check(places == (inj_ready ? 1 : 0) && ru, "injected token delivered once, to its phase");
      if (inj_valid && !inj_ready) check(!free_left(inj_tok.dst.bwd), "free unit refilled from the host");
      n_put  += dq_put;
      n_get  += dq_get;
      n_inj  += inj_ready;
      n_host += host_valid;
      @(posedge clk);
    end
    check(n_loop > 0 && n_net > 0 && n_put > 0 && n_get > 0 && n_inj > 0 && n_host > 0 && n_wait > 0,
          "every route occurred");
    $display("routes: loop=%0d net=%0d put=%0d get=%0d inj=%0d host=%0d wait=%0d",
             n_loop, n_net, n_put, n_get, n_inj, n_host, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
