// bm_bank: one broadcast memory (BM) bank, 4096 x 64.
//
// A broadcast cluster holds 16 of these, one per PE. Port A is the DMA
// side: each 1024-bit AXI beat carries one 64-bit word for each of the 16
// banks, so the DMA reads or writes all banks at the same address. Port B
// is the accelerator side: a synchronous read used by the broadcast memory
// controller (operands, LDBM bursts) and a write used by STBM. Reads have
// one cycle of latency and hold their output while their enable is low,
// which the DMA uses as a stall. The depth follows the 12-bit Bmaddr; the
// port arrangement follows the text (DMA on one port, the PE on the other).
module bm_bank
  import dragon_pkg::*;
#(
  parameter int unsigned DEPTH = BM_DEPTH,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A (DMA)
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  word_t         a_wdata,
  output word_t         a_rdata,
  // port B (accelerator)
  input  logic          b_ren,
  input  logic [AW-1:0] b_raddr,
  output word_t         b_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_waddr,
  input  word_t         b_wdata
);
  word_t mem [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (b_we && !(a_en && a_we && a_addr == b_waddr)) mem[b_waddr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_ren) b_rdata <= mem[b_raddr];
  end
endmodule
