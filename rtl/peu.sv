// peu: processing elementary unit, the execution unit of a coordinating
// processor that performs the operator of a fired instruction on its
// operand pair.
//
// Purely combinational. Arithmetic is Q8.8 with saturation. The neuron
// operations implement the back-propagation equations:
//   SIG / SIGP : o = logistic(net)        (piecewise-linear approximation;
//                                          SIGP also pushes o on stack imm)
//   POPD       : delta = e * o * (1 - o), o popped from stack imm
//   MULI       : w * o with the weight w as the instruction's immediate
// together with ADD, SUB, MUL, ADDI, COPY, PUSH and POP (ndf_pkg::opcode_e).
// For the stack operations the PEU raises stk_req with the direction, the
// stack number (low bits of imm) and the value to push; stk_rdata is the
// value popped in the same cycle.
// The logistic neuron and the delta term follow the architecture's
// learning equations; the opcode set, number format and the logistic
// approximation are this design's choices.
module peu
  import ndf_pkg::*;
#(
  parameter int unsigned NSTK = 64
) (
  input  opcode_e                 op,
  input  value_t                  a,
  input  value_t                  b,
  input  value_t                  imm,
  input  value_t                  stk_rdata,
  output value_t                  r,
  output logic                    stk_req,
  output logic                    stk_push,
  output logic [$clog2(NSTK)-1:0] stk_idx,
  output value_t                  stk_wdata
);
  logic signed [2*VW+1:0] wa, wb, wi;
  value_t sig_a, one_minus_o, deriv;

  assign wa = (2*VW+2)'(a);
  assign wb = (2*VW+2)'(b);
  assign wi = (2*VW+2)'(imm);
  assign sig_a       = fx_sigmoid(a);
  assign one_minus_o = value_t'(1 <<< FRAC) - stk_rdata;
  assign deriv       = fx_mul(stk_rdata, one_minus_o);
  assign stk_idx     = imm[$clog2(NSTK)-1:0];

  always_comb begin
    r         = a;
    stk_req   = 1'b0;
    stk_push  = 1'b0;
    stk_wdata = a;
    unique case (op)
      OP_COPY: r = a;
      OP_ADD:  r = sat(wa + wb);
      OP_SUB:  r = sat(wa - wb);
      OP_MUL:  r = fx_mul(a, b);
      OP_MULI: r = fx_mul(a, imm);
      OP_ADDI: r = sat(wa + wi);
      OP_SIG:  r = sig_a;
      OP_SIGP: begin
        r = sig_a; stk_req = 1'b1; stk_push = 1'b1; stk_wdata = sig_a;
      end
      OP_PUSH: begin
        r = a; stk_req = 1'b1; stk_push = 1'b1; stk_wdata = a;
      end
      OP_POPD: begin
        r = fx_mul(a, deriv); stk_req = 1'b1;
      end
      OP_POP: begin
        r = stk_rdata; stk_req = 1'b1;
      end
      default: r = a;
    endcase
  end
endmodule
