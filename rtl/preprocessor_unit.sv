// preprocessor_unit: one pipelined preprocessor unit of a coordinating
// processor. A CP has two of them, one for the tokens of the forward phase
// and one for those of the backward (learning) phase, so that the two
// phases of back-propagation never wait behind each other before execution.
//
// Pipeline, with the interstage registers named after the stages they join:
//   L (load)   a token from CP.DI is accepted into LMP when the unit is free
//              (CP_free); the frame-store address MVB + IX is formed.
//   M (match)  single-input destination: passes to MFP without matching.
//              Two-input destination: one match request to the shared frame
//              store. Partner absent: the operand is stored there (AF set)
//              and the token leaves the pipeline. Partner present: AF is
//              cleared and the operand pair, ordered by input port, goes to
//              MFP.
//   F (fetch)  the instruction at the token's IP is read from the
//              instruction store; operands and instruction go to FOP, which
//              the execution unit takes with fop_take.
// free depends only on this unit's registers, fop_take and the frame-store
// grant, never on this cycle's in_valid. `init` empties all stages.
// Timing: a token accepted at one clock edge is in FOP two edges later if
// nothing stalls; one token per cycle when the execution unit keeps up.
// The stages L, M, F, the registers LMP, MFP, FOP, CP_free and Init follow
// the architecture; the stage boundaries and handshakes are this design's.
module preprocessor_unit
  import ndf_pkg::*;
#(
  parameter int unsigned FS_DEPTH = 256,
  parameter int unsigned IS_DEPTH = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  // CP.DI
  input  logic   in_valid,
  input  token_t in_tok,
  output logic   free,
  // frame store (shared, arbitrated)
  output logic                        fs_req,
  output logic [$clog2(FS_DEPTH)-1:0] fs_addr,
  output value_t                      fs_wval,
  input  logic                        fs_gnt,
  input  logic                        fs_hit,
  input  value_t                      fs_partner,
  // instruction store read port
  output logic [$clog2(IS_DEPTH)-1:0] is_addr,
  input  instr_t                      is_instr,
  // to the execution unit
  output logic   fop_valid,
  output fired_t fop,
  input  logic   fop_take,
  output pre_events_t ev,
  output logic   idle
);
  localparam int unsigned FAW = $clog2(FS_DEPTH);

  typedef struct packed {
    logic            p;
    dtype_e          t;
    logic [IPW-1:0]  ip;
    value_t          a;
    value_t          b;
    logic [MVBW-1:0] mvb;
  } pair_t;

  logic            lmp_valid;
  token_t          lmp_tok;
  logic [FAW-1:0]  lmp_addr;
  logic            mfp_valid;
  pair_t           mfp;

  // ---------------- F stage ----------------
  logic fop_ready, mfp_ready;
  assign fop_ready = !fop_valid || fop_take;
  assign mfp_ready = !mfp_valid || fop_ready;
  assign is_addr   = $clog2(IS_DEPTH)'(mfp.ip);

  // ---------------- M stage ----------------
  logic lmp_done, lmp_to_mfp, lmp_ready;
  assign fs_addr    = lmp_addr;
  assign fs_wval    = lmp_tok.v;
  assign fs_req     = lmp_valid && lmp_tok.dst.dyadic && mfp_ready && !init;
  assign lmp_done   = lmp_valid && !init &&
                      (lmp_tok.dst.dyadic ? (fs_req && fs_gnt) : mfp_ready);
  assign lmp_to_mfp = lmp_done && (!lmp_tok.dst.dyadic || fs_hit);
  assign lmp_ready  = !lmp_valid || lmp_done;

  pair_t m_pair;
  always_comb begin
    m_pair.p   = lmp_tok.p;
    m_pair.t   = lmp_tok.t;
    m_pair.ip  = lmp_tok.dst.ip;
    m_pair.mvb = lmp_tok.mvb;
    m_pair.a   = lmp_tok.v;
    m_pair.b   = '0;
    if (lmp_tok.dst.dyadic) begin
      if (lmp_tok.dst.port) begin
        m_pair.a = fs_partner;
        m_pair.b = lmp_tok.v;
      end else begin
        m_pair.b = fs_partner;
      end
    end
  end

  // ---------------- L stage ----------------
  logic l_take;
  assign free   = lmp_ready && !init;
  assign l_take = in_valid && free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lmp_valid <= 1'b0;
      mfp_valid <= 1'b0;
      fop_valid <= 1'b0;
    end else if (init) begin
      lmp_valid <= 1'b0;
      mfp_valid <= 1'b0;
      fop_valid <= 1'b0;
    end else begin
      if (lmp_ready) lmp_valid <= l_take;
      if (mfp_ready) mfp_valid <= lmp_to_mfp;
      if (fop_ready) fop_valid <= mfp_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (l_take) begin
      lmp_tok  <= in_tok;
      lmp_addr <= FAW'(in_tok.mvb) + FAW'(in_tok.dst.ix);
    end
    if (mfp_ready && lmp_to_mfp) mfp <= m_pair;
    if (fop_ready && mfp_valid) begin
      fop.p   <= mfp.p;
      fop.t   <= mfp.t;
      fop.a   <= mfp.a;
      fop.b   <= mfp.b;
      fop.mvb <= mfp.mvb;
      fop.ins <= is_instr;
    end
  end

  assign idle = !lmp_valid && !mfp_valid && !fop_valid;

  always_comb begin
    ev = '0;
    ev.load        = l_take;
    ev.bypass      = lmp_done && !lmp_tok.dst.dyadic;
    ev.match_store = lmp_done && lmp_tok.dst.dyadic && !fs_hit;
    ev.match_hit   = lmp_done && lmp_tok.dst.dyadic && fs_hit;
    ev.fs_wait     = fs_req && !fs_gnt;
  end

  // The execution unit only takes an instruction that is there.
  assert property (@(posedge clk) disable iff (!rst_n) fop_take |-> fop_valid);
endmodule
