// regfile: 256 x 64-bit register file of a DRAGON processing element.
//
// Three synchronous read ports (slot-1 Src1, slot-1 Src2, slot-2 Src2) and
// two write ports (slot-1 result, slot-2 load), as a VLIW PE with a compute
// slot and a memory slot needs them. Reads are registered: the address is
// presented in the Decode stage and the data is valid in Execute1. A read
// of a register written in the same cycle returns the new value (write
// bypass), so a result written back is seen by an instruction decoded in
// the same cycle. If both write ports hit the same register, port 0
// (compute slot) wins. The 256-entry size is the document's; the port
// count, bypass and priority are this design's own choices.
module regfile
  import dragon_pkg::*;
#(
  parameter int unsigned DEPTH = RF_DEPTH,
  parameter int unsigned NRD   = 3,
  parameter int unsigned NWR   = 2
) (
  input  logic                     clk,
  input  logic [NRD-1:0][$clog2(DEPTH)-1:0] raddr,
  output word_t [NRD-1:0]          rdata,
  input  logic [NWR-1:0]           we,
  input  logic [NWR-1:0][$clog2(DEPTH)-1:0] waddr,
  input  word_t [NWR-1:0]          wdata
);
  word_t mem [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    for (int w = NWR - 1; w >= 0; w--)
      if (we[w]) mem[waddr[w]] <= wdata[w];
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < int'(NRD); r++) begin
      rdata[r] <= mem[raddr[r]];
      for (int w = NWR - 1; w >= 0; w--)
        if (we[w] && waddr[w] == raddr[r]) rdata[r] <= wdata[w];
    end
  end
endmodule
