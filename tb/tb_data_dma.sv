// tb_data_dma: self-checking test of the data DMA.
// Connects the DMA to a global-memory model with random stalls and to a
// BM port model of 16 x 4096 x 64 bits. Runs RDGMEM-style transfers
// (GM -> BM) and WRGMEM-style transfers (BM -> GM) of random sizes and
// offsets (within 4 KB), checks every word, and checks that an unstalled
// 32-beat read takes one beat per cycle. A monitor checks that every AXI
// burst carries exactly the commanded number of beats.
module tb_data_dma;
  import dragon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid, busy, bm_en, bm_we;
  dma_cmd_t cmd;
  logic [11:0] bm_addr;
  logic [GM_DW-1:0] bm_wdata, bm_rdata;
  axi_req_t req;
  axi_rsp_t rsp;
  logic [63:0] gm_base;
  logic [GM_DW-1:0] bm [4096];
  int checks = 0, failures = 0;
  int stall_pct = 30;

  data_dma dut (.clk, .rst_n, .gm_base, .cmd_valid, .cmd, .busy, .bm_en, .bm_we, .bm_addr,
                .bm_wdata, .bm_rdata, .m_axi_req(req), .m_axi_rsp(rsp));

  axi_rsp_t rsp_raw;
  gm_model #(.LINES(256), .STALL(0)) gm (.clk, .rst_n, .req(req_g), .rsp(rsp_raw));
  // stall injection on top of the model
  axi_req_t req_g;
  logic stall;
  always_ff @(posedge clk) stall <= ($urandom % 100) < stall_pct;
  always_comb begin
    req_g = req;
    rsp   = rsp_raw;
    if (stall) begin
      req_g.r_ready = 0; rsp.r_valid = 0;
      req_g.w_valid = 0; rsp.w_ready = 0;
    end
  end

  always_ff @(posedge clk) begin
    if (bm_en && bm_we) bm[bm_addr] <= bm_wdata;
    if (bm_en) bm_rdata <= bm[bm_addr];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every burst must carry exactly the commanded number of beats
  logic [8:0] cur_beats;
  always @(posedge clk) begin
    if (cmd_valid) cur_beats <= cmd.beats;
    if (req.ar_valid && rsp.ar_ready) begin
      checks++;
      if (9'(req.ar.len) + 9'd1 != cur_beats) begin
        failures++; $display("FAIL AR len %0d for %0d beats", req.ar.len, cur_beats);
      end
    end
    if (req.aw_valid && rsp.aw_ready) begin
      checks++;
      if (9'(req.aw.len) + 9'd1 != cur_beats) begin
        failures++; $display("FAIL AW len %0d for %0d beats", req.aw.len, cur_beats);
      end
    end
  end

  task automatic run(input logic wr, input int beats, input int bmoff, input int gmoff);
    @(negedge clk);
    cmd.write = wr; cmd.beats = 9'(beats); cmd.bm_off = 12'(bmoff); cmd.gm_off = 64'(gmoff);
    cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    while (busy) @(negedge clk);
  endtask

  function automatic logic [GM_DW-1:0] rline();
    logic [GM_DW-1:0] v;
    for (int w = 0; w < 32; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    cmd_valid = 0; cmd = '0; gm_base = 64'h2000;   // line 64 of the model
    for (int i = 0; i < 256; i++) gm.mem[i] = rline();
    for (int i = 0; i < 4096; i++) bm[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int beats, bmoff, gmline;
      logic wr;
      beats  = 1 + int'($urandom % 32);
      gmline = int'($urandom % (32 - beats + 1));    // stay inside one 4 KB page
      gmline = gmline + 32 * int'($urandom % 4);
      bmoff  = int'($urandom % 4000);
      wr     = t % 2;
      if (wr) for (int i = 0; i < beats; i++) bm[(bmoff + i) % 4096] = rline();
      run(wr, beats, bmoff, gmline * 128);
      for (int i = 0; i < beats; i++) begin
        checks++;
        if (gm.mem[64 + gmline + i] !== bm[(bmoff + i) % 4096]) begin
          failures++;
          $display("FAIL %s beat %0d", wr ? "write" : "read", i);
        end
      end
    end
    // throughput: no stalls, 32 beats GM -> BM
    stall_pct = 0;
    repeat (3) @(negedge clk);
    begin
      int t0, t1;
      @(negedge clk);
      cmd.write = 0; cmd.beats = 32; cmd.bm_off = 0; cmd.gm_off = 0; cmd_valid = 1;
      t0 = $time / 10;
      @(negedge clk); cmd_valid = 0;
      while (busy) @(negedge clk);
      t1 = $time / 10;
      checks++;
      // command, AR, 32 beats at one per cycle
      if (t1 - t0 > 32 + 4) begin failures++; $display("FAIL read took %0d cycles", t1 - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
