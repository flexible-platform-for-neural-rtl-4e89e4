// instruction_store: the instruction store (IS) holding the data flow
// program, one instruction per node of the data flow graph.
//
// The host writes instructions through one write port before the program
// runs (or while it is idle). Every coordinating processor has its own
// combinational read port, used in its F (fetch) stage, so the processors
// never wait for each other here. An instruction holds an operation, an
// immediate (synaptic weight or neuron-stack number) and up to NDST
// destinations (see ndf_pkg::instr_t).
// That the IS holds the program as a graph follows the architecture; the
// instruction format and the port organisation are this design's choice.
module instruction_store
  import ndf_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned NRD   = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  instr_t                   wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr [NRD],
  output instr_t                   rdata [NRD]
);
  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) rdata[i] = mem[raddr[i]];
  end
endmodule
