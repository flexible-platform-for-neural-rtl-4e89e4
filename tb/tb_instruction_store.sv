// tb_instruction_store: writes random instructions into the instruction
// store through the host port and reads them back on every read port at
// once, each port at its own address, comparing with a copy kept here.
module tb_instruction_store;
  import ndf_pkg::*;
  localparam int unsigned DEPTH = 64, NRD = 3;
  logic clk = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] waddr = '0;
  instr_t wdata;
  logic [$clog2(DEPTH)-1:0] raddr [NRD];
  instr_t rdata [NRD];
  instr_t shadow [DEPTH];
  int checks = 0, failures = 0;

  instruction_store #(.DEPTH(DEPTH), .NRD(NRD)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  function automatic instr_t rnd_instr();
    logic [$bits(instr_t)-1:0] b;
    for (int i = 0; i < $bits(instr_t); i += 32) b = {b, $urandom};
    return instr_t'(b);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    for (int i = 0; i < NRD; i++) raddr[i] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = $clog2(DEPTH)'(a); wdata = rnd_instr(); shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // occasionally overwrite one entry
      if (n % 7 == 3) begin
        we = 1; waddr = $clog2(DEPTH)'($urandom_range(0, DEPTH-1)); wdata = rnd_instr();
      end else we = 0;
      for (int i = 0; i < NRD; i++) raddr[i] = $clog2(DEPTH)'($urandom_range(0, DEPTH-1));
      #1;
      for (int i = 0; i < NRD; i++) begin
        checks++;
        if (rdata[i] !== shadow[raddr[i]]) begin
          failures++; $display("FAIL: port %0d addr %0d", i, raddr[i]);
        end
      end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
