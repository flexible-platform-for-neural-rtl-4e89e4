// execution_unit: the execution unit of a coordinating processor. It takes
// a fired instruction from one of the two preprocessor units, executes it in
// the PEU and issues one result token per destination.
//
//   O (operate) the instruction in the chosen FOP register is executed (with
//               one access to the shared neuron stack bank for the stack
//               operations) and the first result token is issued.
//   C (copy)    for every further destination the unit stays in C and
//               issues one more copy of the result per cycle; the FOP
//               register stays occupied meanwhile, which stalls that
//               preprocessor unit.
// When both preprocessor units offer an instruction the unit alternates
// between them (round robin); a multi-copy instruction is finished before
// the other unit is served. Results go to the communication unit (res_wr,
// res_tok) when it has space (res_space). An instruction with no
// destination is executed for its side effect (a stack push).
// Timing: one instruction, or one copy, per cycle.
// The O and C states and the PEU follow the architecture; the choice
// between the two preprocessor units and one copy per cycle are this
// design's.
module execution_unit
  import ndf_pkg::*;
#(
  parameter int unsigned NSTK = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  // from the two preprocessor units (0 forward, 1 backward)
  input  logic   fop_valid [2],
  input  fired_t fop       [2],
  output logic   fop_take  [2],
  // neuron stack bank (shared, arbitrated)
  output logic                    stk_req,
  output logic                    stk_push,
  output logic [$clog2(NSTK)-1:0] stk_idx,
  output value_t                  stk_wdata,
  input  logic                    stk_gnt,
  input  value_t                  stk_rdata,
  // to the communication unit
  output logic   res_wr,
  output token_t res_tok,
  input  logic   res_space,
  output exe_events_t ev
);
  logic       cur;         // preprocessor unit being served
  logic       last;        // unit served last (round robin)
  logic [1:0] cnt;         // 0: state O, >0: state C, copy number
  value_t     res_q;       // result kept for the copies
  fired_t     f;

  // In C the unit stays with the instruction it started.
  always_comb begin
    if (cnt != 2'd0)                     cur = last;
    else if (fop_valid[0] && fop_valid[1]) cur = ~last;
    else                                 cur = fop_valid[1];
  end
  assign f = fop[cur];

  value_t peu_r;
  logic   peu_stk_req;
  peu #(.NSTK(NSTK)) u_peu (
    .op(f.ins.op), .a(f.a), .b(f.b), .imm(f.ins.imm), .stk_rdata(stk_rdata),
    .r(peu_r), .stk_req(peu_stk_req), .stk_push(stk_push), .stk_idx(stk_idx),
    .stk_wdata(stk_wdata)
  );

  logic has_dest, o_can, fire_o, fire_c, release_i;
  assign has_dest  = (f.ins.ndest != '0);
  assign o_can     = fop_valid[cur] && (cnt == 2'd0) && (!has_dest || res_space) && !init;
  assign stk_req   = o_can && peu_stk_req;
  assign fire_o    = o_can && (!peu_stk_req || stk_gnt);
  assign fire_c    = fop_valid[cur] && (cnt != 2'd0) && res_space && !init;
  assign release_i = (fire_o && f.ins.ndest <= NDSTW'(1)) ||
                     (fire_c && (NDSTW'(cnt) + NDSTW'(1) == f.ins.ndest));

  always_comb begin
    fop_take[0] = release_i && (cur == 1'b0);
    fop_take[1] = release_i && (cur == 1'b1);
    res_wr      = (fire_o && has_dest) || fire_c;
    res_tok.p   = f.p;
    res_tok.t   = f.t;
    res_tok.mvb = f.mvb;
    res_tok.v   = fire_c ? res_q : peu_r;
    res_tok.dst = f.ins.dst[cnt];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      last <= 1'b1;
    end else if (init) begin
      cnt  <= '0;
      last <= 1'b1;
    end else begin
      if (fire_o) last <= cur;
      if (release_i)   cnt <= '0;
      else if (fire_o) cnt <= 2'd1;
      else if (fire_c) cnt <= cnt + 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (fire_o) res_q <= peu_r;
  end

  always_comb begin
    ev = '0;
    ev.operate  = fire_o;
    ev.copy     = fire_c;
    ev.stk_push = fire_o && peu_stk_req && stk_push;
    ev.stk_pop  = fire_o && peu_stk_req && !stk_push;
    ev.stk_wait = stk_req && !stk_gnt;
    ev.conflict = o_can && fop_valid[0] && fop_valid[1];
  end

  // An instruction lists at most NDST destinations.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fop_valid[cur] |-> f.ins.ndest <= NDSTW'(NDST));
endmodule
