// data_dma: data mover between one global-memory (GM) bank and the 16
// broadcast memory banks of one broadcast cluster.
//
// The control unit sends one command frame (RDGMEM or WRGMEM): direction,
// GM byte offset, BM word offset and number of 1024-bit beats (1..256).
// The DMA adds its GM base pointer (set by the host) to the offset and runs
// a single AXI4 INCR burst of 128-byte beats. Each beat carries one 64-bit
// word for each of the 16 banks, all at the same BM address (BM offset +
// beat index), so a beat per cycle moves 16 words.
//   read  (GM -> BM): AR, then every R beat is written to the banks as it
//         arrives (one beat per cycle when the memory streams).
//   write (BM -> GM): AW, then W beats read from the banks with one cycle of
//         read latency; the bank read is only advanced when the current
//         beat is taken, so a beat per cycle is sustained while w_ready is
//         high; then the B response.
// busy rises in the cycle after cmd_valid and falls when the transfer has
// completed. The command fields and the 1024-bit width follow the document;
// one burst per command and the handshake are this design's choices. The
// document notes that a 4 KB AXI boundary limits a burst to 32 beats; the
// program has to respect it and an assertion flags a violation.
module data_dma
  import dragon_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [63:0]       gm_base,
  input  logic              cmd_valid,
  input  dma_cmd_t          cmd,
  output logic              busy,
  // BM port of the cluster
  output logic              bm_en,
  output logic              bm_we,
  output logic [11:0]       bm_addr,
  output logic [GM_DW-1:0]  bm_wdata,
  input  logic [GM_DW-1:0]  bm_rdata,
  // AXI4 master
  output axi_req_t          m_axi_req,
  input  axi_rsp_t          m_axi_rsp
);
  typedef enum logic [2:0] {IDLE, AR, RD, AW, WR, BR} st_e;
  st_e       st;
  dma_cmd_t  c;
  logic [8:0] rd_idx, cnt;
  logic      wv;

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; c <= '0; rd_idx <= '0; cnt <= '0; wv <= 1'b0;
    end else begin
      unique case (st)
        IDLE: if (cmd_valid) begin
          c      <= cmd;
          rd_idx <= '0;
          cnt    <= '0;
          wv     <= 1'b0;
          st     <= cmd.write ? AW : AR;
        end
        AR: if (m_axi_rsp.ar_ready) st <= RD;
        RD: if (m_axi_rsp.r_valid) begin
          cnt <= cnt + 1'b1;
          if (m_axi_rsp.r.last) st <= IDLE;
        end
        AW: if (m_axi_rsp.aw_ready) st <= WR;
        WR: begin
          if (!wv || m_axi_rsp.w_ready) begin
            if (rd_idx < c.beats) begin
              rd_idx <= rd_idx + 1'b1;
              wv     <= 1'b1;
            end else begin
              wv     <= 1'b0;
            end
          end
          if (wv && m_axi_rsp.w_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == c.beats - 1'b1) st <= BR;
          end
        end
        BR: if (m_axi_rsp.b_valid) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  logic adv;
  assign adv = (st == WR) && (!wv || m_axi_rsp.w_ready) && (rd_idx < c.beats);

  always_comb begin
    bm_en    = 1'b0;
    bm_we    = 1'b0;
    bm_addr  = c.bm_off + 12'(cnt);
    bm_wdata = m_axi_rsp.r.data;
    if (st == RD && m_axi_rsp.r_valid) begin
      bm_en = 1'b1;
      bm_we = 1'b1;
    end else if (adv) begin
      bm_en   = 1'b1;
      bm_addr = c.bm_off + 12'(rd_idx);
    end
  end

  always_comb begin
    m_axi_req          = '0;
    m_axi_req.ar.addr  = gm_base + c.gm_off;
    m_axi_req.ar.len   = 8'(c.beats - 1'b1);
    m_axi_req.ar.size  = 3'd7;             // 128 bytes per beat
    m_axi_req.ar.burst = 2'b01;            // INCR
    m_axi_req.aw       = m_axi_req.ar;
    m_axi_req.ar_valid = (st == AR);
    m_axi_req.aw_valid = (st == AW);
    m_axi_req.r_ready  = (st == RD);
    m_axi_req.w.data   = bm_rdata;
    m_axi_req.w.strb   = '1;
    m_axi_req.w.last   = (cnt == c.beats - 1'b1);
    m_axi_req.w_valid  = (st == WR) && wv;
    m_axi_req.b_ready  = (st == BR);
  end

  // An AXI burst must not cross a 4 KB boundary.
  assert property (@(posedge clk) disable iff (!rst_n)
    (st == IDLE && cmd_valid) |->
      ((gm_base + cmd.gm_off) & 64'hFFF) + 64'(cmd.beats) * 64'd128 <= 64'd4096);
endmodule
