// ndf_pkg: types and constants shared by the Neural DF data flow machine.
//
// A data token (the operand that travels along an edge of the data flow
// graph) has the fields <P><D=<T,V>><MVB><DST><IX>: priority, data type and
// value, base address of the matching vector in the frame store, destination
// instruction and the index of the item inside the matching vector. Those
// fields follow the architecture; their widths are this design's choice.
// DST is split into the consumer's instruction pointer, the input port the
// operand enters (left/right), whether the consumer has two inputs (only
// then is operand matching done), whether the consumer belongs to the
// backward (learning) phase, which selects the preprocessor unit that takes
// the token, and a flag that sends the token to the host.
//
// Values are 16-bit signed fixed point with 8 fraction bits (Q8.8); the
// number format is this design's choice.
package ndf_pkg;

  localparam int unsigned VW      = 16;  // data value width (Q8.8)
  localparam int unsigned FRAC    = 8;   // fraction bits of a value
  localparam int unsigned IPW     = 8;   // instruction pointer width
  localparam int unsigned MVBW    = 8;   // frame store address width
  localparam int unsigned IXW     = 4;   // index inside a matching vector
  localparam int unsigned NDST    = 4;   // destinations per instruction
  localparam int unsigned NDSTW   = 3;   // width of the destination count

  typedef logic signed [VW-1:0] value_t;

  // Data type T of a token; carried through the machine unchanged.
  typedef enum logic [1:0] {
    T_FIX  = 2'd0,   // fixed-point activation / error value
    T_WGT  = 2'd1,   // weight value
    T_CTL  = 2'd2,   // control token
    T_RSV  = 2'd3
  } dtype_e;

  // Destination of a token (also one destination field of an instruction).
  typedef struct packed {
    logic           host;    // deliver to the host instead of an operator
    logic           bwd;     // consumer is in the backward phase
    logic           dyadic;  // consumer has two inputs: match in frame store
    logic           port;    // 0: left operand, 1: right operand
    logic [IPW-1:0] ip;      // consumer instruction (tag when host = 1)
    logic [IXW-1:0] ix;      // item index inside the matching vector
  } dest_t;

  // Data token <P><T,V><MVB><DST><IX>; IX is held inside dst.
  typedef struct packed {
    logic            p;      // priority (1 = high)
    dtype_e          t;      // data type
    value_t          v;      // data value
    logic [MVBW-1:0] mvb;    // matching vector base address
    dest_t           dst;    // destination and index
  } token_t;

  typedef enum logic [3:0] {
    OP_COPY = 4'd0,  // r = a                (monadic, used for fan-out)
    OP_ADD  = 4'd1,  // r = a + b            (saturating)
    OP_SUB  = 4'd2,  // r = a - b            (saturating)
    OP_MUL  = 4'd3,  // r = a * b            (Q8.8, saturating)
    OP_MULI = 4'd4,  // r = a * imm          (synaptic weight as immediate)
    OP_SIG  = 4'd5,  // r = logistic(a)
    OP_SIGP = 4'd6,  // r = logistic(a), push r on neuron stack imm
    OP_PUSH = 4'd7,  // r = a, push a on neuron stack imm
    OP_POPD = 4'd8,  // pop o from stack imm, r = a * o * (1 - o)
    OP_POP  = 4'd9,  // pop o from stack imm, r = o
    OP_ADDI = 4'd10  // r = a + imm          (bias)
  } opcode_e;

  // One instruction of the data flow program held in the instruction store.
  typedef struct packed {
    opcode_e              op;
    logic [NDSTW-1:0]     ndest;  // number of valid destinations, 0..NDST
    value_t               imm;    // immediate operand (weight, stack number)
    dest_t [NDST-1:0]     dst;    // destination i is dst[i]
  } instr_t;

  // Fired instruction handed from a preprocessor unit to the execution
  // unit: operand pair, context and the fetched instruction (register FOP).
  typedef struct packed {
    logic            p;
    dtype_e          t;
    value_t          a;      // left operand
    value_t          b;      // right operand
    logic [MVBW-1:0] mvb;
    instr_t          ins;
  } fired_t;

  // Per-cycle event flags of one preprocessor unit.
  typedef struct packed {
    logic load;        // L: token taken into the pipeline
    logic bypass;      // M: single-input operand, no matching
    logic match_store; // M: partner absent, operand stored in FS
    logic match_hit;   // M: partner present, operand pair formed
    logic fs_wait;     // M: waiting for the shared frame store
  } pre_events_t;

  // Per-cycle event flags of the execution unit.
  typedef struct packed {
    logic operate;     // O: instruction executed, first result issued
    logic copy;        // C: another copy of the result issued
    logic stk_push;    // O: value pushed on a neuron stack
    logic stk_pop;     // O: value popped from a neuron stack
    logic stk_wait;    // O: waiting for the shared neuron stack bank
    logic conflict;    // O: both preprocessor units offered an instruction
  } exe_events_t;

  // Events of one coordinating processor; pre[0] forward, pre[1] backward.
  typedef struct packed {
    pre_events_t [1:0] pre;
    exe_events_t       exe;
  } cp_events_t;

  // Instruction/destination construction helpers (used by testbenches and
  // by anyone assembling a program).
  function automatic dest_t mk_dest(input logic host, input logic dyadic,
                                    input logic port, input int ip,
                                    input int ix, input logic bwd = 1'b0);
    dest_t d;
    d.host   = host;
    d.bwd    = bwd;
    d.dyadic = dyadic;
    d.port   = port;
    d.ip     = IPW'(ip);
    d.ix     = IXW'(ix);
    return d;
  endfunction

  // Saturate a wide signed result to a value.
  localparam int VMAX = (1 <<< (VW - 1)) - 1;
  localparam int VMIN = -(1 <<< (VW - 1));

  function automatic value_t sat(input logic signed [2*VW+1:0] x);
    if (x > (2*VW+2)'(VMAX))      return value_t'(VMAX);
    else if (x < (2*VW+2)'(VMIN)) return value_t'(VMIN);
    else                          return x[VW-1:0];
  endfunction

  // Q8.8 multiply with saturation.
  function automatic value_t fx_mul(input value_t a, input value_t b);
    logic signed [2*VW+1:0] p;
    p = (2*VW+2)'(a) * (2*VW+2)'(b);
    return sat(p >>> FRAC);
  endfunction

  // Piecewise-linear logistic function (PLAN approximation):
  //   |x| >= 5        : 1
  //   2.375 <= |x| < 5: |x|/32 + 0.84375
  //   1 <= |x| < 2.375: |x|/8  + 0.625
  //   |x| < 1         : |x|/4  + 0.5
  // and 1 - y for negative x.
  function automatic value_t fx_sigmoid(input value_t x);
    logic [VW-1:0] ax;
    logic [VW-1:0] y;
    ax = x[VW-1] ? VW'(-x) : VW'(x);
    if (x == {1'b1, {(VW-1){1'b0}}}) ax = {1'b0, {(VW-1){1'b1}}};
    if (ax >= VW'(5 << FRAC))         y = VW'(1 << FRAC);
    else if (ax >= VW'(608))          y = (ax >> 5) + VW'(216);
    else if (ax >= VW'(1 << FRAC))    y = (ax >> 3) + VW'(160);
    else                              y = (ax >> 2) + VW'(128);
    return x[VW-1] ? value_t'(VW'(1 << FRAC) - y) : value_t'(y);
  endfunction

endpackage
