// coordinating_processor: one coordinating processor (CP) of the Neural DF
// machine. It takes data tokens, matches the operands of two-input
// operators, fetches and executes the instruction, and sends one result
// token per destination of the instruction into the network.
//
// Structure: two pipelined preprocessor units (stages L, M, F; unit 0 takes
// tokens of the forward phase, unit 1 those of the backward phase, chosen
// by the token's dst.bwd bit), one execution unit (states O and C, with the
// PEU) and one communication unit (output queue on CP.DO).
// CP.DI is one token port per preprocessor unit (in_valid/in_tok, taken
// when free is high; free is CP_free of that unit). Both units share this
// CP's execution unit but each has its own frame-store and
// instruction-store port. CP.DO is out_valid/out_tok/out_ready.
// Timing: with nothing stalling, a token whose operator needs no partner,
// or completes a pair, accepted at clock edge t is executed at edge t+3 and
// its first result is offered on CP.DO after that edge; further copies
// follow one per cycle. `init` empties every stage.
// The split into two preprocessor units, an execution unit and a
// communication unit follows the architecture; separating the two units by
// learning phase through a bit of the destination is this design's reading.
module coordinating_processor
  import ndf_pkg::*;
#(
  parameter int unsigned FS_DEPTH = 256,
  parameter int unsigned IS_DEPTH = 256,
  parameter int unsigned NSTK     = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  // CP.DI, one port per preprocessor unit (0 forward, 1 backward)
  input  logic   in_valid [2],
  input  token_t in_tok   [2],
  output logic   cp_free  [2],
  // frame store ports (shared, arbitrated), one per preprocessor unit
  output logic                        fs_req     [2],
  output logic [$clog2(FS_DEPTH)-1:0] fs_addr    [2],
  output value_t                      fs_wval    [2],
  input  logic                        fs_gnt     [2],
  input  logic                        fs_hit,
  input  value_t                      fs_partner,
  // instruction store read ports, one per preprocessor unit
  output logic [$clog2(IS_DEPTH)-1:0] is_addr  [2],
  input  instr_t                      is_instr [2],
  // neuron stack bank (shared, arbitrated)
  output logic                        stk_req,
  output logic                        stk_push,
  output logic [$clog2(NSTK)-1:0]     stk_idx,
  output value_t                      stk_wdata,
  input  logic                        stk_gnt,
  input  value_t                      stk_rdata,
  // CP.DO
  output logic   out_valid,
  output token_t out_tok,
  input  logic   out_ready,
  output cp_events_t ev,
  output logic   idle        // no token anywhere in the CP
);
  logic   fop_valid [2];
  fired_t fop       [2];
  logic   fop_take  [2];
  logic   pre_idle  [2];
  logic   res_wr, res_space;
  token_t res_tok;

  for (genvar u = 0; u < 2; u++) begin : g_pre
    preprocessor_unit #(.FS_DEPTH(FS_DEPTH), .IS_DEPTH(IS_DEPTH)) u_pre (
      .clk, .rst_n, .init,
      .in_valid(in_valid[u]), .in_tok(in_tok[u]), .free(cp_free[u]),
      .fs_req(fs_req[u]), .fs_addr(fs_addr[u]), .fs_wval(fs_wval[u]),
      .fs_gnt(fs_gnt[u]), .fs_hit(fs_hit), .fs_partner(fs_partner),
      .is_addr(is_addr[u]), .is_instr(is_instr[u]),
      .fop_valid(fop_valid[u]), .fop(fop[u]), .fop_take(fop_take[u]),
      .ev(ev.pre[u]), .idle(pre_idle[u])
    );
  end

  execution_unit #(.NSTK(NSTK)) u_exe (
    .clk, .rst_n, .init,
    .fop_valid, .fop, .fop_take,
    .stk_req, .stk_push, .stk_idx, .stk_wdata, .stk_gnt, .stk_rdata,
    .res_wr, .res_tok, .res_space, .ev(ev.exe)
  );

  communication_unit u_com (
    .clk, .rst_n, .init, .wr(res_wr), .wtok(res_tok), .space(res_space),
    .out_valid, .out_tok, .out_ready
  );

  assign idle = pre_idle[0] && pre_idle[1] && !out_valid;
endmodule
