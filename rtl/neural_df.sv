// neural_df: the Neural DF data flow module, a dynamic data flow machine
// with direct operand matching that runs neural networks mapped onto data
// flow graphs, with the layers of the network working as a pipeline on
// successive patterns.
//
// N_CP coordinating processors, each with two preprocessor units (forward
// and backward phase), share one instruction store (IS, one read port per
// preprocessor unit), one frame store (FS, matching vectors <AF><V>), one
// data queue unit (DQU) and the bank of neuron stacks. The FS and the
// stack bank take one access per cycle; round-robin arbiters choose among
// the preprocessor units (FS) or execution units (stacks) that ask. The token router (interconnection network) sends every
// result token to its own CP if free, else to another free CP, else into
// the DQU, and refills free CPs from the DQU and then from the host.
//
// Host interface (the host computer itself is outside this module):
//   is_we/is_waddr/is_wdata  load the data flow program;
//   inj_*                    inject input tokens (valid/ready);
//   res_*                    result tokens whose destination is the host
//                            (valid/ready; res_tok.dst.ip is a tag);
//   init                     clears every pipeline stage, all AF flags,
//                            the DQU and the neuron stacks.
// Status: idle (nothing in flight), event flags of every CP and of the
// router, DQU puts and gets, a neuron-stack error flag, the number of
// operands waiting in the FS and of tokens waiting in the DQU.
// The set of units and how tokens move between them follow the
// architecture; the number of CPs, the memory sizes and the sharing
// scheme are this design's choices.
module neural_df
  import ndf_pkg::*;
#(
  parameter int unsigned N_CP      = 4,
  parameter int unsigned IS_DEPTH  = 256,
  parameter int unsigned FS_DEPTH  = 256,
  parameter int unsigned DQU_DEPTH = 64,
  parameter int unsigned NSTK      = 64,
  parameter int unsigned D_MAX     = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  // program load
  input  logic                        is_we,
  input  logic [$clog2(IS_DEPTH)-1:0] is_waddr,
  input  instr_t                      is_wdata,
  // token injection
  input  logic   inj_valid,
  input  token_t inj_tok,
  output logic   inj_ready,
  // results
  output logic   res_valid,
  output token_t res_tok,
  input  logic   res_ready,
  // status
  output logic            idle,
  output cp_events_t      cp_ev   [N_CP],
  output logic [N_CP-1:0] ev_loop,
  output logic [N_CP-1:0] ev_net,
  output logic            ev_dq_put,
  output logic            ev_dq_get,
  output logic            stk_err,
  output logic [$clog2(FS_DEPTH):0] fs_waiting,
  output logic [$clog2(DQU_DEPTH)+1:0] dq_waiting
);
  localparam int unsigned FAW = $clog2(FS_DEPTH);
  localparam int unsigned IAW = $clog2(IS_DEPTH);
  localparam int unsigned SAW = $clog2(NSTK);

  // CP side signals
  localparam int unsigned NPRE = 2 * N_CP;   // preprocessor units

  logic         cp_in_valid [N_CP][2];
  token_t       cp_in_tok   [N_CP][2];
  logic         cp_free     [N_CP][2];
  logic         cp_out_valid[N_CP];
  token_t       cp_out_tok  [N_CP];
  logic         cp_out_ready[N_CP];
  logic         cp_idle     [N_CP];
  logic [NPRE-1:0] fs_req, fs_gnt;
  logic [N_CP-1:0] stk_req, stk_gnt;
  logic            cp_fs_req [N_CP][2];
  logic            cp_fs_gnt [N_CP][2];
  logic [FAW-1:0]  cp_fs_addr[N_CP][2];
  value_t          cp_fs_wval[N_CP][2];
  logic            cp_stk_push [N_CP];
  logic [SAW-1:0]  cp_stk_idx  [N_CP];
  value_t          cp_stk_wdata[N_CP];
  logic [IAW-1:0]  is_raddr  [NPRE];
  instr_t          is_rdata  [NPRE];
  logic [IAW-1:0]  cp_is_addr[N_CP][2];
  instr_t          cp_is_ins [N_CP][2];

  // shared units
  logic           fs_any, fs_hit;
  logic [FAW-1:0] fs_a;
  value_t         fs_v, fs_partner;
  logic           sb_any, sb_push;
  logic [SAW-1:0] sb_idx;
  value_t         sb_wdata, sb_rdata;
  logic           dq_put, dq_get, dq_get_valid;
  logic [1:0]     dq_room;
  token_t         dq_put_tok, dq_get_tok;
  logic [$clog2(DQU_DEPTH):0] dq_cnt_hi, dq_cnt_lo;

  for (genvar i = 0; i < N_CP; i++) begin : g_cp
    coordinating_processor #(
      .FS_DEPTH(FS_DEPTH), .IS_DEPTH(IS_DEPTH), .NSTK(NSTK)
    ) u_cp (
      .clk, .rst_n, .init,
      .in_valid(cp_in_valid[i]), .in_tok(cp_in_tok[i]), .cp_free(cp_free[i]),
      .fs_req(cp_fs_req[i]), .fs_addr(cp_fs_addr[i]), .fs_wval(cp_fs_wval[i]),
      .fs_gnt(cp_fs_gnt[i]), .fs_hit(fs_hit), .fs_partner(fs_partner),
      .is_addr(cp_is_addr[i]), .is_instr(cp_is_ins[i]),
      .stk_req(stk_req[i]), .stk_push(cp_stk_push[i]), .stk_idx(cp_stk_idx[i]),
      .stk_wdata(cp_stk_wdata[i]), .stk_gnt(stk_gnt[i]), .stk_rdata(sb_rdata),
      .out_valid(cp_out_valid[i]), .out_tok(cp_out_tok[i]),
      .out_ready(cp_out_ready[i]), .ev(cp_ev[i]), .idle(cp_idle[i])
    );
    // preprocessor unit u of CP i is requester / read port 2*i+u
    for (genvar u = 0; u < 2; u++) begin : g_unit
      assign fs_req[2*i+u]    = cp_fs_req[i][u];
      assign cp_fs_gnt[i][u]  = fs_gnt[2*i+u];
      assign is_raddr[2*i+u]  = cp_is_addr[i][u];
      assign cp_is_ins[i][u]  = is_rdata[2*i+u];
    end
  end

  instruction_store #(.DEPTH(IS_DEPTH), .NRD(NPRE)) u_is (
    .clk, .we(is_we), .waddr(is_waddr), .wdata(is_wdata),
    .raddr(is_raddr), .rdata(is_rdata)
  );

  // frame store, one match per cycle
  rr_arbiter #(.N(NPRE)) u_fs_arb (.clk, .rst_n, .req(fs_req), .gnt(fs_gnt));

  always_comb begin
    fs_any = 1'b0;
    fs_a   = cp_fs_addr[0][0];
    fs_v   = cp_fs_wval[0][0];
    for (int i = 0; i < N_CP; i++) begin
      for (int u = 0; u < 2; u++) begin
        if (fs_gnt[2*i+u]) begin
          fs_any = 1'b1;
          fs_a   = cp_fs_addr[i][u];
          fs_v   = cp_fs_wval[i][u];
        end
      end
    end
  end

  frame_store #(.DEPTH(FS_DEPTH)) u_fs (
    .clk, .rst_n, .init, .req(fs_any), .addr(fs_a), .wval(fs_v),
    .hit(fs_hit), .partner(fs_partner), .occupancy(fs_waiting)
  );

  // neuron stack bank, one access per cycle
  rr_arbiter #(.N(N_CP)) u_stk_arb (.clk, .rst_n, .req(stk_req), .gnt(stk_gnt));

  always_comb begin
    sb_any   = 1'b0;
    sb_push  = cp_stk_push[0];
    sb_idx   = cp_stk_idx[0];
    sb_wdata = cp_stk_wdata[0];
    for (int i = 0; i < N_CP; i++) begin
      if (stk_gnt[i]) begin
        sb_any   = 1'b1;
        sb_push  = cp_stk_push[i];
        sb_idx   = cp_stk_idx[i];
        sb_wdata = cp_stk_wdata[i];
      end
    end
  end

  neuron_stack_bank #(.NSTK(NSTK), .D_MAX(D_MAX)) u_stk (
    .clk, .rst_n, .init, .req(sb_any), .push(sb_push), .idx(sb_idx),
    .wdata(sb_wdata), .rdata(sb_rdata), .err(stk_err), .level()
  );

  data_queue_unit #(.DEPTH(DQU_DEPTH)) u_dqu (
    .clk, .rst_n, .init, .put(dq_put), .put_tok(dq_put_tok), .room(dq_room),
    .get_valid(dq_get_valid), .get_tok(dq_get_tok), .get(dq_get),
    .count_hi(dq_cnt_hi), .count_lo(dq_cnt_lo)
  );

  token_router #(.N(N_CP)) u_net (
    .out_valid(cp_out_valid), .out_tok(cp_out_tok), .out_ready(cp_out_ready),
    .cp_free(cp_free), .in_valid(cp_in_valid), .in_tok(cp_in_tok),
    .dq_put(dq_put), .dq_put_tok(dq_put_tok), .dq_room(dq_room),
    .dq_get_valid(dq_get_valid), .dq_get_tok(dq_get_tok), .dq_get(dq_get),
    .inj_valid(inj_valid && !init), .inj_tok(inj_tok), .inj_ready(inj_ready),
    .host_valid(res_valid), .host_tok(res_tok), .host_ready(res_ready),
    .ev_loop(ev_loop), .ev_net(ev_net)
  );

  assign ev_dq_put  = dq_put;
  assign dq_waiting = ($clog2(DQU_DEPTH)+2)'(dq_cnt_hi) + ($clog2(DQU_DEPTH)+2)'(dq_cnt_lo);
  assign ev_dq_get = dq_get;

  always_comb begin
    idle = !dq_get_valid;
    for (int i = 0; i < N_CP; i++) idle &= cp_idle[i];
  end
endmodule
