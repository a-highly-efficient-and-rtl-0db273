// instr_mem: DRAGON instruction memory (IM), 512 KiB.
//
// Sixteen 4096 x 64 RAMs form 8 logical banks of 4096 x 128-bit VLIW
// instructions; each bank is a pair of RAMs, one per slot. A 1024-bit line
// (one AXI beat from global memory) writes the same line address in all 16
// RAMs at once: instruction k of the line lies in bits [128k+127:128k],
// slot 1 in the lower half. For reading, the program counter is split into
// a line pointer (upper bits) that addresses all 16 RAMs and a 3-bit
// offset pointer that drives the bank-select mux choosing one of the 8
// instructions. Read latency is one cycle. Organisation and sizes follow
// the document; the bit placement of instructions in a line is this
// design's choice.
module instr_mem
  import dragon_pkg::*;
#(
  parameter int unsigned LINES = 4096,
  localparam int unsigned LW = $clog2(LINES)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [LW-1:0]     waddr,
  input  logic [GM_DW-1:0]  wdata,
  input  logic              re,
  input  logic [LW-1:0]     line_ptr,
  input  logic [2:0]        offset_ptr,
  output logic [63:0]       slot1,
  output logic [63:0]       slot2
);
  logic [15:0][63:0] rd_q;
  logic [2:0]        off_q;

  for (genvar j = 0; j < 16; j++) begin : g_uram
    logic [63:0] mem [LINES];
    initial for (int i = 0; i < int'(LINES); i++) mem[i] = '0;
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata[64*j +: 64];
      if (re) rd_q[j] <= mem[line_ptr];
    end
  end

  always_ff @(posedge clk) if (re) off_q <= offset_ptr;

  // bank select mux
  assign slot1 = rd_q[{off_q, 1'b0}];
  assign slot2 = rd_q[{off_q, 1'b1}];
endmodule
