// token_router: the interconnection network between the coordinating
// processors, the data queue unit and the host.
//
// Every CP has two input ports, one per preprocessor unit (u = 0 forward,
// u = 1 backward); a token can only enter the unit named by its dst.bwd.
// Each cycle the router places the result tokens waiting on the CPs' CP.DO
// ports (combinational allocation, fixed order of the CPs):
//   1. tokens for the host: one per cycle to the host port;
//   2. a token goes back into its own CP when that CP's unit u is free
//      (CP_free);
//   3. otherwise to unit u of another CP that is free and not yet given a
//      token (a network transfer);
//   4. otherwise into the data queue unit (Put DQ), one per cycle, if the
//      queue of its priority has room; otherwise it waits on CP.DO.
// A free unit left without a token then gets the next token from the DQU
// (Get DQ, one per cycle) if that token is for its phase, and after that a
// token injected by the host.
// out_ready tells each CP its token was taken. cp_free, room and
// get_valid must not depend on this cycle's in_valid or out_ready.
// The order own CP, another free CP, DQU follows the architecture; the
// fixed CP order, one DQU access of each kind per cycle and the host ports
// are this design's choices.
module token_router
  import ndf_pkg::*;
#(
  parameter int unsigned N = 4
) (
  // CP.DO of every CP
  input  logic   out_valid [N],
  input  token_t out_tok   [N],
  output logic   out_ready [N],
  // CP.DI of every CP, one port per preprocessor unit
  input  logic   cp_free   [N][2],
  output logic   in_valid  [N][2],
  output token_t in_tok    [N][2],
  // data queue unit
  output logic   dq_put,
  output token_t dq_put_tok,
  input  logic [1:0] dq_room,
  input  logic   dq_get_valid,
  input  token_t dq_get_tok,
  output logic   dq_get,
  // host
  input  logic   inj_valid,
  input  token_t inj_tok,
  output logic   inj_ready,
  output logic   host_valid,
  output token_t host_tok,
  input  logic   host_ready,
  // events of this cycle
  output logic [N-1:0] ev_loop,
  output logic [N-1:0] ev_net
);
  logic taken [N][2];
  logic done  [N];
  logic found;
  logic u;

  always_comb begin
    u = 1'b0;
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < 2; k++) begin
        taken[i][k]    = 1'b0;
        in_valid[i][k] = 1'b0;
        in_tok[i][k]   = out_tok[i];
      end
      done[i]      = 1'b0;
      ev_loop[i]   = 1'b0;
      ev_net[i]    = 1'b0;
    end
    host_valid = 1'b0;
    host_tok   = out_tok[0];
    dq_put     = 1'b0;
    dq_put_tok = out_tok[0];
    dq_get     = 1'b0;
    inj_ready  = 1'b0;
    found      = 1'b0;

    // 1. host
    for (int i = 0; i < N; i++) begin
      if (out_valid[i] && out_tok[i].dst.host && host_ready && !host_valid) begin
        host_valid = 1'b1;
        host_tok   = out_tok[i];
        done[i]    = 1'b1;
      end
    end
    // 2. own CP
    for (int i = 0; i < N; i++) begin
      u = out_tok[i].dst.bwd;
      if (out_valid[i] && !out_tok[i].dst.host && cp_free[i][u]) begin
        taken[i][u]    = 1'b1;
        in_valid[i][u] = 1'b1;
        in_tok[i][u]   = out_tok[i];
        done[i]     = 1'b1;
        ev_loop[i]  = 1'b1;
      end
    end
    // 3. another free CP
    for (int i = 0; i < N; i++) begin
      if (out_valid[i] && !out_tok[i].dst.host && !done[i]) begin
        found = 1'b0;
        u     = out_tok[i].dst.bwd;
        for (int j = 0; j < N; j++) begin
          if (!found && cp_free[j][u] && !taken[j][u]) begin
            found          = 1'b1;
            taken[j][u]    = 1'b1;
            in_valid[j][u] = 1'b1;
            in_tok[j][u]   = out_tok[i];
            done[i]     = 1'b1;
            ev_net[i]   = 1'b1;
          end
        end
      end
    end
    // 4. data queue unit
    for (int i = 0; i < N; i++) begin
      if (out_valid[i] && !out_tok[i].dst.host && !done[i] && !dq_put &&
          dq_room[out_tok[i].p]) begin
        dq_put     = 1'b1;
        dq_put_tok = out_tok[i];
        done[i]    = 1'b1;
      end
    end
    // 5. Get DQ into a free unit of the token's phase
    u = dq_get_tok.dst.bwd;
    for (int j = 0; j < N; j++) begin
      if (dq_get_valid && !dq_get && cp_free[j][u] && !taken[j][u]) begin
        taken[j][u]    = 1'b1;
        in_valid[j][u] = 1'b1;
        in_tok[j][u]   = dq_get_tok;
        dq_get         = 1'b1;
      end
    end
    // 6. host injection into a free unit of the token's phase
    u = inj_tok.dst.bwd;
    for (int j = 0; j < N; j++) begin
      if (inj_valid && !inj_ready && cp_free[j][u] && !taken[j][u]) begin
        taken[j][u]    = 1'b1;
        in_valid[j][u] = 1'b1;
        in_tok[j][u]   = inj_tok;
        inj_ready      = 1'b1;
      end
    end
    for (int i = 0; i < N; i++) out_ready[i] = done[i];
  end
endmodule
