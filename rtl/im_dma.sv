// im_dma: instruction DMA, active only during the boot sequence.
//
// Copies the program from global memory into the instruction memory: the
// program size in bytes (from the host) is rounded up to whole 128-byte
// lines, and the lines are fetched with AXI4 INCR read bursts of at most
// 32 beats (4 KB, so a burst never crosses a 4 KB boundary when the
// program pointer is 4 KB aligned). Beat i of the program becomes IM line
// i, written as it arrives. done pulses for one cycle after the last beat.
// That a separate DMA loads the program, from a host-set pointer and size,
// during boot, follows the document; the burst splitting and the
// interface are this design's choices. Programs larger than the IM
// (4096 lines, 512 KiB) are cut at that size.
module im_dma
  import dragon_pkg::*;
#(
  parameter int unsigned LINES = 4096,
  localparam int unsigned LW = $clog2(LINES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [63:0]       gm_addr,
  input  logic [31:0]       size_bytes,
  output logic              busy,
  output logic              done,
  output logic              im_we,
  output logic [LW-1:0]     im_waddr,
  output logic [GM_DW-1:0]  im_wdata,
  output axi_req_t          m_axi_req,
  input  axi_rsp_t          m_axi_rsp
);
  typedef enum logic [1:0] {IDLE, AR, RD} st_e;
  st_e         st;
  logic [LW:0] total, line, burst_end;
  logic [63:0] addr;

  function automatic logic [LW:0] lines_of(input logic [31:0] bytes);
    logic [31:0] n;
    n = (bytes + 32'd127) >> 7;
    return (n > 32'(LINES)) ? (LW+1)'(LINES) : (LW+1)'(n);
  endfunction

  logic [LW:0] left, blen;
  assign left = total - line;
  assign blen = (left > (LW+1)'(AXI_MAX_BEATS)) ? (LW+1)'(AXI_MAX_BEATS) : left;

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; total <= '0; line <= '0; burst_end <= '0; addr <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          total <= lines_of(size_bytes);
          line  <= '0;
          addr  <= gm_addr;
          if (lines_of(size_bytes) == '0) done <= 1'b1;
          else st <= AR;
        end
        AR: if (m_axi_rsp.ar_ready) begin
          burst_end <= line + blen;
          addr      <= addr + 64'(blen) * 64'd128;
          st        <= RD;
        end
        RD: if (m_axi_rsp.r_valid) begin
          line <= line + 1'b1;
          if (m_axi_rsp.r.last) begin
            if (line + 1'b1 >= total) begin
              st   <= IDLE;
              done <= 1'b1;
            end else st <= AR;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign im_we    = (st == RD) && m_axi_rsp.r_valid;
  assign im_waddr = line[LW-1:0];
  assign im_wdata = m_axi_rsp.r.data;

  always_comb begin
    m_axi_req          = '0;
    m_axi_req.ar.addr  = addr;
    m_axi_req.ar.len   = 8'(blen - 1'b1);
    m_axi_req.ar.size  = 3'd7;
    m_axi_req.ar.burst = 2'b01;
    m_axi_req.ar_valid = (st == AR);
    m_axi_req.r_ready  = (st == RD);
  end
endmodule
