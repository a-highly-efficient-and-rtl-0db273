// local_mem: local memory (LM) of a DRAGON processing element, 4096 x 64.
//
// Second level of the memory hierarchy, between the register file and the
// broadcast memory. Port A belongs to the PE pipeline: one synchronous read
// (LD, STBM from LM) and one write (stores from either VLIW slot, NST) in
// the same cycle, so a load and a store can overlap as the memory slot
// requires. Port B is a write-only port used by the broadcast memory
// controller for LDBM bursts. Reads return the old contents when the same
// address is written in that cycle; if both ports write one address,
// port A wins. The size (12-bit Lmaddr) follows the instruction format;
// the second write port is this design's choice (the LDBM engine and the
// pipeline share a true dual-port RAM on an FPGA).
module local_mem
  import dragon_pkg::*;
#(
  parameter int unsigned DEPTH = LM_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_raddr,
  output word_t         a_rdata,
  input  logic          a_we,
  input  logic [AW-1:0] a_waddr,
  input  word_t         a_wdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_waddr,
  input  word_t         b_wdata
);
  word_t mem [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_waddr == b_waddr)) mem[b_waddr] <= b_wdata;
    if (a_we) mem[a_waddr] <= a_wdata;
    a_rdata <= mem[a_raddr];
  end
endmodule
