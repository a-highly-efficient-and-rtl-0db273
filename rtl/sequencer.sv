// sequencer: the DRAGON sequencer, the controller's "brain".
//
// Groups the AXI-Lite control interface (host handshake and arguments),
// the control unit (boot, fetch, decode, loops, DMA commands), the 512 KiB
// instruction memory and the instruction DMA that fills it from global
// memory during boot. Outputs are the two SIMD slot streams for the
// accelerator (slot 2 also carries LDBM for the broadcast memory
// controllers), the command frame for the data DMAs and the per-cluster
// GM pointers; irq signals the end of the program to the host.
// The composition follows the document's sequencer overview; the
// interfaces are this design's.
module sequencer
  import dragon_pkg::*;
#(
  parameter int unsigned NBC      = 9,
  parameter int unsigned IM_LINES = 4096
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  axil_req_t            s_axil_req,
  output axil_rsp_t            s_axil_rsp,
  output logic                 irq,
  output axi_req_t             m_axi_im_req,
  input  axi_rsp_t             m_axi_im_rsp,
  output logic [63:0]          dc_slot_stream,
  output logic [63:0]          mem_slot_stream,
  output logic                 dma_cmd_valid,
  output dma_cmd_t             dma_cmd,
  input  logic                 dma_busy,
  output logic [NBC-1:0][63:0] gm_ptr,
  output logic                 loop_error
);
  localparam int unsigned LW  = $clog2(IM_LINES);
  localparam int unsigned PCW = LW + 3;

  logic        ap_start, ap_ready, ap_done, ap_idle, reuse;
  logic [31:0] psize;
  logic [63:0] im_ptr;

  axil_ctrl #(.NBC(NBC)) u_axil (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .ap_start, .ap_ready, .ap_done, .ap_idle,
    .prog_size(psize), .reuse, .im_ptr, .gm_ptr, .irq
  );

  logic            imdma_start, imdma_done, imdma_busy, im_we, im_re;
  logic [LW-1:0]   im_waddr, im_line;
  logic [GM_DW-1:0] im_wdata;
  logic [2:0]      im_off;
  logic [63:0]     im_s1, im_s2;

  im_dma #(.LINES(IM_LINES)) u_imdma (
    .clk, .rst_n, .start(imdma_start), .gm_addr(im_ptr), .size_bytes(psize),
    .busy(imdma_busy), .done(imdma_done),
    .im_we, .im_waddr, .im_wdata,
    .m_axi_req(m_axi_im_req), .m_axi_rsp(m_axi_im_rsp)
  );

  instr_mem #(.LINES(IM_LINES)) u_im (
    .clk, .we(im_we), .waddr(im_waddr), .wdata(im_wdata),
    .re(im_re), .line_ptr(im_line), .offset_ptr(im_off),
    .slot1(im_s1), .slot2(im_s2)
  );

  control_unit #(.PCW(PCW)) u_cu (
    .clk, .rst_n, .ap_start, .reuse, .ap_ready, .ap_done, .ap_idle,
    .imdma_start, .imdma_done,
    .im_re, .im_line, .im_offset(im_off), .im_slot1(im_s1), .im_slot2(im_s2),
    .dc_slot_stream, .mem_slot_stream, .dma_cmd_valid, .dma_cmd, .dma_busy,
    .loop_error
  );
endmodule
