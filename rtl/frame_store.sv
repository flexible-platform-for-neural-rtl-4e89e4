// frame_store: the frame store (FS) of matching vectors and its direct
// operand matching function.
//
// Each entry is <AF><V>: an affiliation flag telling that an operand is
// waiting, and that operand's value. A token for a two-input operator
// addresses the entry MVB + IX directly (no associative search). A match
// request reads the entry and, in the same clock edge:
//   AF = 0: the partner is absent, the request's value is written and AF set;
//   AF = 1: the partner is present, its value is returned (hit) and AF cleared.
// The read is combinational, so hit/partner are valid in the request cycle
// and the read-modify-write is atomic: two requests to one entry in
// consecutive cycles see each other's effect. One request per cycle; the
// caller arbitrates among the coordinating processors. `init` clears every
// AF in one cycle (the value array needs no reset).
// The <AF><V> format and the matching rule follow the architecture; the
// single-port, one-match-per-cycle organisation is this design's choice.
// With one flag per entry, matching pairs two operands; an operator with
// more inputs is built by the program as a tree of two-input operators.
module frame_store
  import ndf_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic                     req,      // match request
  input  logic [$clog2(DEPTH)-1:0] addr,     // MVB + IX
  input  value_t                   wval,     // operand value of the request
  output logic                     hit,      // partner found (AF was 1)
  output value_t                   partner,  // partner's value when hit
  output logic [$clog2(DEPTH):0]   occupancy // entries with AF = 1
);
  logic [DEPTH-1:0] af;
  value_t           val [DEPTH];
  logic [$clog2(DEPTH):0] occ_q;

  assign hit       = req && af[addr];
  assign partner   = val[addr];
  assign occupancy = occ_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      af    <= '0;
      occ_q <= '0;
    end else if (init) begin
      af    <= '0;
      occ_q <= '0;
    end else if (req) begin
      if (af[addr]) begin
        af[addr] <= 1'b0;
        occ_q    <= occ_q - 1'b1;
      end else begin
        af[addr] <= 1'b1;
        occ_q    <= occ_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req && !init && !af[addr]) val[addr] <= wval;
  end
endmodule
