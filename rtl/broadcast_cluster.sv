// broadcast_cluster: one DRAGON broadcast cluster (BC).
//
// Sixteen PEs in a 4 x 4 2D mesh (PE index = 4*row + column), sixteen
// broadcast memory banks (one per PE) and the broadcast memory controller.
// The SIMD VLIW stream from the sequencer (slot1/slot2) reaches all PEs
// and the controller in the same cycle. The DMA side is one 1024-bit port
// that reads or writes the same address in all 16 banks, bank k holding
// bits [64k+63:64k]; its read data arrives one cycle after dma_en.
// Each PE's STBM writes its own bank through the bank's accelerator port.
// Neighbour links inside the cluster are wired here; the links on the
// cluster's four edges are brought out (index = column for north/south,
// row for east/west) so that clusters can be tiled into a larger mesh.
// The PE in local row r, column c gets the id pe_id_base + r*row_stride + c,
// so the caller can number PEs row-major over the whole mesh.
// Structure (16 PEs, 16 banks, 2D mesh, 1024-bit DMA port, 64-bit bank
// links) follows the document; the edge-port layout and the PE id scheme
// are this design's choices.
module broadcast_cluster
  import dragon_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       pe_id_base,
  input  logic [15:0]       row_stride,
  input  logic [63:0]       slot1,
  input  logic [63:0]       slot2,
  // DMA port
  input  logic              dma_en,
  input  logic              dma_we,
  input  logic [11:0]       dma_addr,
  input  logic [GM_DW-1:0]  dma_wdata,
  output logic [GM_DW-1:0]  dma_rdata,
  // mesh edges
  input  logic  [3:0]       n_in_valid, s_in_valid, e_in_valid, w_in_valid,
  input  word_t [3:0]       n_in_data,  s_in_data,  e_in_data,  w_in_data,
  output logic  [3:0]       n_out_valid, s_out_valid, e_out_valid, w_out_valid,
  output word_t [3:0]       n_out_data,  s_out_data,  e_out_data,  w_out_data,
  output logic              error,
  output logic              bmc_busy
);
  localparam int unsigned NPE = 16;

  logic                 b_ren;
  logic [11:0]          b_raddr;
  word_t [NPE-1:0]      b_rdata, pe_bm, lm_wd;
  logic  [NPE-1:0]      lm_we;
  logic [11:0]          lm_wa;

  bmc #(.NPE(NPE)) u_bmc (
    .clk, .rst_n, .slot1, .slot2,
    .b_ren, .b_raddr, .b_rdata,
    .pe_rdata(pe_bm), .lm_we, .lm_waddr(lm_wa), .lm_wdata(lm_wd),
    .busy(bmc_busy)
  );

  logic  [NPE-1:0][3:0] ov;
  word_t [NPE-1:0]      od;
  logic  [NPE-1:0]      bwe, perr;
  logic  [NPE-1:0][11:0] bwa;
  word_t [NPE-1:0]      bwd;

  for (genvar k = 0; k < int'(NPE); k++) begin : g_pe
    localparam int R = k / 4;
    localparam int C = k % 4;
    logic  [3:0] iv;
    word_t [3:0] id;

    // north buffer: from the PE above sending South
    if (R > 0) begin : g_n
      assign iv[DIR_N] = ov[k-4][DIR_S]; assign id[DIR_N] = od[k-4];
    end else begin : g_ne
      assign iv[DIR_N] = n_in_valid[C];  assign id[DIR_N] = n_in_data[C];
    end
    if (R < 3) begin : g_s
      assign iv[DIR_S] = ov[k+4][DIR_N]; assign id[DIR_S] = od[k+4];
    end else begin : g_se
      assign iv[DIR_S] = s_in_valid[C];  assign id[DIR_S] = s_in_data[C];
    end
    if (C > 0) begin : g_w
      assign iv[DIR_W] = ov[k-1][DIR_E]; assign id[DIR_W] = od[k-1];
    end else begin : g_we
      assign iv[DIR_W] = w_in_valid[R];  assign id[DIR_W] = w_in_data[R];
    end
    if (C < 3) begin : g_e
      assign iv[DIR_E] = ov[k+1][DIR_W]; assign id[DIR_E] = od[k+1];
    end else begin : g_ee
      assign iv[DIR_E] = e_in_valid[R];  assign id[DIR_E] = e_in_data[R];
    end

    pe #(.FIFO_DEPTH(FIFO_DEPTH)) u_pe (
      .clk, .rst_n,
      .pe_id(pe_id_base + 16'(R) * row_stride + 16'(C)),
      .slot1, .slot2,
      .bm_rdata(pe_bm[k]),
      .lm_b_we(lm_we[k]), .lm_b_waddr(lm_wa), .lm_b_wdata(lm_wd[k]),
      .bm_we(bwe[k]), .bm_waddr(bwa[k]), .bm_wdata(bwd[k]),
      .nb_in_valid(iv), .nb_in_data(id),
      .nb_out_valid(ov[k]), .nb_out_data(od[k]),
      .error(perr[k])
    );

    bm_bank #(.DEPTH(BM_DEPTH)) u_bank (
      .clk,
      .a_en(dma_en), .a_we(dma_we), .a_addr(dma_addr),
      .a_wdata(dma_wdata[64*k +: 64]), .a_rdata(dma_rdata[64*k +: 64]),
      .b_ren, .b_raddr, .b_rdata(b_rdata[k]),
      .b_we(bwe[k]), .b_waddr(bwa[k]), .b_wdata(bwd[k])
    );
  end

  for (genvar i = 0; i < 4; i++) begin : g_edge
    assign n_out_valid[i] = ov[i][DIR_N];      assign n_out_data[i] = od[i];
    assign s_out_valid[i] = ov[12+i][DIR_S];   assign s_out_data[i] = od[12+i];
    assign w_out_valid[i] = ov[4*i][DIR_W];    assign w_out_data[i] = od[4*i];
    assign e_out_valid[i] = ov[4*i+3][DIR_E];  assign e_out_data[i] = od[4*i+3];
  end

  assign error = |perr;
endmodule
