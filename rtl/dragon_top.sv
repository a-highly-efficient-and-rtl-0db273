// dragon_top: the DRAGON many-core overlay.
//
// A controller and an accelerator working in tandem. The controller is
// the sequencer (host interface, instruction memory, instruction DMA,
// control unit) plus one data DMA per broadcast cluster, each with its own
// AXI4 port to a global-memory bank. The accelerator is a BC_ROWS x
// BC_COLS grid of broadcast clusters, each a 4 x 4 mesh of PEs with 16
// broadcast memory banks, tiled into one (4*BC_ROWS) x (4*BC_COLS) 2D mesh
// (12 x 12 = 144 PEs by default). The links on the outer edge of the mesh
// are brought out as ports (mesh, not torus): a program's words sent off
// the edge appear on mesh_*_out, and words driven on mesh_*_in land in the
// edge PEs' input buffers. Left unconnected (inputs tied to 0) the edges
// are simply open; a host-side or testbench model can use them to supply
// boundary values, and a second device could be attached there. PEs are numbered row-major over the whole mesh
// and the id is available to programs as an operand.
// Every PE receives the same VLIW word in the same cycle (SIMD): the
// sequencer's registered streams fan out to all clusters directly. All data
// DMAs receive the same command (the program does not depend on the number
// of clusters); each adds its own GM pointer. The program stalls until all
// of them are done.
// Interface: AXI-Lite slave for the host (start/done handshake, program
// size, reuse flag, pointers), irq at the end of the program, one AXI4
// master (1024-bit data) for the instruction DMA and one per cluster for
// data. error gathers the PEs' sticky error flags and the loop-stack error.
// The 3 x 3 grid, the 2D mesh and the one-DMA-per-cluster arrangement
// follow the document; the PE numbering and the edge ports are this
// design's choices.
module dragon_top
  import dragon_pkg::*;
#(
  parameter int unsigned BC_ROWS    = 3,
  parameter int unsigned BC_COLS    = 3,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned IM_LINES   = 4096,
  localparam int unsigned NBC = BC_ROWS * BC_COLS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  axil_req_t          s_axil_req,
  output axil_rsp_t          s_axil_rsp,
  output logic               irq,
  output axi_req_t           m_axi_im_req,
  input  axi_rsp_t           m_axi_im_rsp,
  output axi_req_t [NBC-1:0] m_axi_gm_req,
  input  axi_rsp_t [NBC-1:0] m_axi_gm_rsp,
  // outer mesh edges; north/south indexed by global column, east/west by
  // global row
  input  logic  [4*BC_COLS-1:0] mesh_n_in_valid, mesh_s_in_valid,
  input  word_t [4*BC_COLS-1:0] mesh_n_in_data,  mesh_s_in_data,
  output logic  [4*BC_COLS-1:0] mesh_n_out_valid, mesh_s_out_valid,
  output word_t [4*BC_COLS-1:0] mesh_n_out_data,  mesh_s_out_data,
  input  logic  [4*BC_ROWS-1:0] mesh_e_in_valid, mesh_w_in_valid,
  input  word_t [4*BC_ROWS-1:0] mesh_e_in_data,  mesh_w_in_data,
  output logic  [4*BC_ROWS-1:0] mesh_e_out_valid, mesh_w_out_valid,
  output word_t [4*BC_ROWS-1:0] mesh_e_out_data,  mesh_w_out_data,
  output logic               error
);
  logic [63:0]          s1, s2;
  logic                 cmd_valid, loop_err;
  dma_cmd_t             cmd;
  logic [NBC-1:0]       dbusy, bcerr, bmcbusy;
  logic [NBC-1:0][63:0] gm_ptr;

  sequencer #(.NBC(NBC), .IM_LINES(IM_LINES)) u_seq (
    .clk, .rst_n, .s_axil_req, .s_axil_rsp, .irq,
    .m_axi_im_req, .m_axi_im_rsp,
    .dc_slot_stream(s1), .mem_slot_stream(s2),
    .dma_cmd_valid(cmd_valid), .dma_cmd(cmd), .dma_busy(|dbusy),
    .gm_ptr, .loop_error(loop_err)
  );

  // mesh links between clusters
  logic  [NBC-1:0][3:0] nov, sov, eov, wov, niv, siv, eiv, wiv;
  word_t [NBC-1:0][3:0] nod, sod, eod, wod, nid, sid, eid, wid;

  for (genvar b = 0; b < int'(NBC); b++) begin : g_bc
    localparam int R = b / int'(BC_COLS);
    localparam int C = b % int'(BC_COLS);

    logic             bm_en, bm_we;
    logic [11:0]      bm_addr;
    logic [GM_DW-1:0] bm_wdata, bm_rdata;

    data_dma u_dma (
      .clk, .rst_n, .gm_base(gm_ptr[b]), .cmd_valid, .cmd, .busy(dbusy[b]),
      .bm_en, .bm_we, .bm_addr, .bm_wdata, .bm_rdata,
      .m_axi_req(m_axi_gm_req[b]), .m_axi_rsp(m_axi_gm_rsp[b])
    );

    if (R > 0) begin : g_n
      assign niv[b] = sov[b-int'(BC_COLS)]; assign nid[b] = sod[b-int'(BC_COLS)];
    end else begin : g_no
      assign niv[b] = mesh_n_in_valid[4*C +: 4]; assign nid[b] = mesh_n_in_data[4*C +: 4];
      assign mesh_n_out_valid[4*C +: 4] = nov[b]; assign mesh_n_out_data[4*C +: 4] = nod[b];
    end
    if (R < int'(BC_ROWS) - 1) begin : g_s
      assign siv[b] = nov[b+int'(BC_COLS)]; assign sid[b] = nod[b+int'(BC_COLS)];
    end else begin : g_so
      assign siv[b] = mesh_s_in_valid[4*C +: 4]; assign sid[b] = mesh_s_in_data[4*C +: 4];
      assign mesh_s_out_valid[4*C +: 4] = sov[b]; assign mesh_s_out_data[4*C +: 4] = sod[b];
    end
    if (C > 0) begin : g_w
      assign wiv[b] = eov[b-1]; assign wid[b] = eod[b-1];
    end else begin : g_wo
      assign wiv[b] = mesh_w_in_valid[4*R +: 4]; assign wid[b] = mesh_w_in_data[4*R +: 4];
      assign mesh_w_out_valid[4*R +: 4] = wov[b]; assign mesh_w_out_data[4*R +: 4] = wod[b];
    end
    if (C < int'(BC_COLS) - 1) begin : g_e
      assign eiv[b] = wov[b+1]; assign eid[b] = wod[b+1];
    end else begin : g_eo
      assign eiv[b] = mesh_e_in_valid[4*R +: 4]; assign eid[b] = mesh_e_in_data[4*R +: 4];
      assign mesh_e_out_valid[4*R +: 4] = eov[b]; assign mesh_e_out_data[4*R +: 4] = eod[b];
    end

    broadcast_cluster #(.FIFO_DEPTH(FIFO_DEPTH)) u_bc (
      .clk, .rst_n,
      .pe_id_base(16'(4 * R * 4 * int'(BC_COLS) + 4 * C)),
      .row_stride(16'(4 * BC_COLS)),
      .slot1(s1), .slot2(s2),
      .dma_en(bm_en), .dma_we(bm_we), .dma_addr(bm_addr),
      .dma_wdata(bm_wdata), .dma_rdata(bm_rdata),
      .n_in_valid(niv[b]), .s_in_valid(siv[b]), .e_in_valid(eiv[b]), .w_in_valid(wiv[b]),
      .n_in_data(nid[b]),  .s_in_data(sid[b]),  .e_in_data(eid[b]),  .w_in_data(wid[b]),
      .n_out_valid(nov[b]), .s_out_valid(sov[b]), .e_out_valid(eov[b]), .w_out_valid(wov[b]),
      .n_out_data(nod[b]),  .s_out_data(sod[b]),  .e_out_data(eod[b]),  .w_out_data(wod[b]),
      .error(bcerr[b]), .bmc_busy(bmcbusy[b])
    );
  end

  assign error = |bcerr || loop_err;
endmodule
