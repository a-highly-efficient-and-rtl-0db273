// tb_im_dma: self-checking test of the instruction DMA.
// Loads programs of several sizes (including sizes that are not a whole
// number of lines and sizes above one 32-beat burst) from a global-memory
// model with random stalls and checks every IM line written, the number
// of lines, and that no burst exceeds 32 beats.
module tb_im_dma;
  import dragon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, im_we;
  logic [63:0] gm_addr;
  logic [31:0] size_bytes;
  logic [11:0] im_waddr;
  logic [GM_DW-1:0] im_wdata;
  logic [GM_DW-1:0] im [4096];
  axi_req_t req;
  axi_rsp_t rsp;
  int writes;
  int checks = 0, failures = 0;

  im_dma dut (.clk, .rst_n, .start, .gm_addr, .size_bytes, .busy, .done, .im_we, .im_waddr,
              .im_wdata, .m_axi_req(req), .m_axi_rsp(rsp));
  gm_model #(.LINES(512), .STALL(25)) gm (.clk, .rst_n, .req, .rsp);

  always_ff @(posedge clk) if (im_we) begin im[im_waddr] <= im_wdata; writes++; end
  always_ff @(posedge clk) if (req.ar_valid && rsp.ar_ready) begin
    checks++;
    if (req.ar.len > 31) begin failures++; $display("FAIL burst of %0d beats", req.ar.len + 1); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [4] = '{128, 200, 4096, 9000};
    start = 0; gm_addr = 64'h1000; size_bytes = 0;
    for (int i = 0; i < 512; i++)
      for (int w = 0; w < 32; w++) gm.mem[i][32*w +: 32] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (sizes[s]) begin
      int lines;
      lines = (sizes[s] + 127) / 128;
      for (int i = 0; i < 4096; i++) im[i] = '0;
      writes = 0;
      @(negedge clk); start = 1; size_bytes = sizes[s];
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (writes != lines) begin failures++; $display("FAIL %0d lines written, %0d expected", writes, lines); end
      for (int i = 0; i < lines; i++) begin
        checks++;
        if (im[i] !== gm.mem[32 + i]) begin failures++; $display("FAIL line %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
