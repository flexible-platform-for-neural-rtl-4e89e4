// tb_peu: checks every operation of the processing elementary unit on
// random operands against integer reference arithmetic written here
// (Q8.8, floor rounding, saturation), checks the logistic approximation
// against the exact logistic function to within 0.025, and checks the
// neuron-stack request lines of the stack operations.
module tb_peu;
  import ndf_pkg::*;
  localparam int unsigned NSTK = 16;
  opcode_e op;
  value_t a, b, imm, stk_rdata, r, stk_wdata;
  logic stk_req, stk_push;
  logic [$clog2(NSTK)-1:0] stk_idx;
  int checks = 0, failures = 0;
  logic clk = 0;

  peu #(.NSTK(NSTK)) dut (.op, .a, .b, .imm, .stk_rdata, .r, .stk_req, .stk_push,
                          .stk_idx, .stk_wdata);
  always #5 clk = ~clk;

  function automatic longint clamp(input longint x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction
  function automatic longint floordiv256(input longint x);
    return (x >= 0) ? x / 256 : -((-x + 255) / 256);
  endfunction
  function automatic longint rmul(input longint x, input longint y);
    return clamp(floordiv256(x * y));
  endfunction
  function automatic longint rsig(input longint x);
    real ax, y;
    longint yi;
    ax = (x < 0) ? -x : x;
    if (ax > 32767) ax = 32767;
    ax = ax / 256.0;
    if (ax >= 5.0)        y = 1.0;
    else if (ax >= 2.375) y = ax / 32.0 + 0.84375;
    else if (ax >= 1.0)   y = ax / 8.0 + 0.625;
    else                  y = ax / 4.0 + 0.5;
    yi = longint'($floor(y * 256.0));
    return (x < 0) ? 256 - yi : yi;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s op=%s a=%0d b=%0d imm=%0d o=%0d r=%0d",
                                          what, op.name(), a, b, imm, stk_rdata, r); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ea, eb, ei, eo, exp_r;
    for (int n = 0; n < 4000; n++) begin
      op = opcode_e'($urandom_range(0, 10));
      // mix of small and full-range operands
      a   = (n % 3 == 0) ? value_t'($urandom) : value_t'($signed($urandom_range(0, 2047)) - 1024);
      b   = (n % 5 == 0) ? value_t'($urandom) : value_t'($signed($urandom_range(0, 2047)) - 1024);
      imm = value_t'($urandom_range(0, 2047)) - 16'sd1024;
      stk_rdata = value_t'($urandom_range(0, 256));
      #1;
      ea = a; eb = b; ei = imm; eo = stk_rdata;
      case (op)
        OP_COPY: exp_r = ea;
        OP_ADD:  exp_r = clamp(ea + eb);
        OP_SUB:  exp_r = clamp(ea - eb);
        OP_MUL:  exp_r = rmul(ea, eb);
        OP_MULI: exp_r = rmul(ea, ei);
        OP_ADDI: exp_r = clamp(ea + ei);
        OP_SIG, OP_SIGP: exp_r = rsig(ea);
        OP_PUSH: exp_r = ea;
        OP_POPD: exp_r = rmul(ea, rmul(eo, 256 - eo));
        OP_POP:  exp_r = eo;
        default: exp_r = ea;
      endcase
      check(longint'(r) == exp_r, $sformatf("result (expected %0d)", exp_r));
      check(stk_req == (op inside {OP_SIGP, OP_PUSH, OP_POPD, OP_POP}), "stk_req");
      if (stk_req) begin
        check(stk_push == (op inside {OP_SIGP, OP_PUSH}), "stk_push");
        check(stk_idx == imm[$clog2(NSTK)-1:0], "stk_idx");
        if (stk_push) check(stk_wdata == r, "pushed value");
      end
      if (op == OP_SIG) begin
        real ex;
        ex = 256.0 / (1.0 + $exp(-real'(ea) / 256.0));
        check((real'(r) - ex) < 6.5 && (ex - real'(r)) < 6.5, "logistic accuracy");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
