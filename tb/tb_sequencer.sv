// tb_sequencer: self-checking test of the sequencer.
// Acting as the host over AXI-Lite, the test places a program in a
// global-memory model, sets program size, program pointer and cluster
// pointers, enables the interrupt and sets start. Checks: the program is
// booted into the IM through the instruction DMA (more than one 32-beat
// burst), the slot streams carry the program's words in order (with a
// REPEAT loop), an RDGMEM command reaches the DMA side, STOP raises the
// interrupt and the done bit, and a second start with the reuse flag runs
// the loaded program again without booting even though global memory now
// holds a different program.
module tb_sequencer;
  import dragon_pkg::*;
  import dragon_asm_pkg::*;
  localparam int NBC = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_req_t axil_req;
  axil_rsp_t axil_rsp;
  logic irq, dma_cmd_valid, dma_busy, loop_error;
  axi_req_t im_req;
  axi_rsp_t im_rsp;
  logic [63:0] dc, ms;
  dma_cmd_t dma_cmd;
  logic [NBC-1:0][63:0] gm_ptr;
  int checks = 0, failures = 0;

  sequencer #(.NBC(NBC), .IM_LINES(256)) dut (.clk, .rst_n, .s_axil_req(axil_req),
    .s_axil_rsp(axil_rsp), .irq, .m_axi_im_req(im_req), .m_axi_im_rsp(im_rsp),
    .dc_slot_stream(dc), .mem_slot_stream(ms), .dma_cmd_valid, .dma_cmd, .dma_busy,
    .gm_ptr, .loop_error);
  gm_model #(.LINES(512), .STALL(20)) gm (.clk, .rst_n, .req(im_req), .rsp(im_rsp));

  `include "axil_host.svh"

  int busy_left = 0, ncmd = 0;
  always @(posedge clk) begin
    if (dma_cmd_valid) begin busy_left = 10; ncmd++; end
    else if (busy_left > 0) busy_left--;
  end
  assign dma_busy = busy_left > 0;

  int seen[$];
  always @(negedge clk) if (dc != 0) seen.push_back(int'(dc[15:0]));
  int ims = 0;
  always @(posedge clk) if (im_req.ar_valid && im_rsp.ar_ready) ims++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  function automatic logic [127:0] w(int tag);
    return vliw({6'(OP_ADD), 42'd0, 16'(tag)}, 64'(tag));
  endfunction

  // program at GM byte 0x2000 (line 64): 300 straight words, then a loop
  task automatic put_program(input int base_tag);
    int n;
    logic [127:0] p [512];
    n = 0;
    for (int i = 0; i < 300; i++) p[n++] = w(base_tag + i);
    p[n++] = vliw(ctl(FN_REPEAT, 2), 0);
    p[n++] = w(base_tag + 999);
    p[n++] = vliw(ctl(FN_BNZ), 0);
    p[n++] = 0;
    p[n++] = gmem(0, 4, 0, 64'h80);
    p[n++] = vliw(ctl(FN_STOP), 0);
    for (int i = 0; i < n; i++) gm.mem[64 + i / 8][128 * (i % 8) +: 128] = p[i];
  endtask

  task automatic start_and_wait();
    logic [31:0] d;
    seen.delete();
    axil_write(REG_CTRL, 1);
    while (!irq) @(negedge clk);
    axil_read(REG_CTRL, d);
    chk(d[1], 1, "done bit");
    axil_write(REG_ISR, 1);
    chk(irq, 0, "irq cleared");
  endtask

  initial begin
    axil_req = '0;
    for (int i = 0; i < 512; i++) gm.mem[i] = '0;
    put_program(1);
    repeat (3) @(negedge clk); rst_n = 1;
    axil_write(REG_PSIZE, 306 * 16);
    axil_write64(REG_IMPTR, 64'h2000);
    axil_write64(REG_GMPTR0, 64'h1111_0000);
    axil_write64(REG_GMPTR0 + 8, 64'h2222_0000);
    axil_write(REG_GIE, 1);
    axil_write(REG_IER, 1);
    chk(gm_ptr[0], 64'h1111_0000, "gm_ptr 0");
    chk(gm_ptr[1], 64'h2222_0000, "gm_ptr 1");
    start_and_wait();
    chk(ims, 2, "boot bursts");
    chk(seen.size(), 302, "stream length");
    for (int i = 0; i < 300 && i < seen.size(); i++) chk(seen[i], 1 + i, "stream word");
    if (seen.size() == 302) begin
      chk(seen[300], 1000, "loop body 1");
      chk(seen[301], 1000, "loop body 2");
    end
    chk(ncmd, 1, "dma command");
    // second run: new program in GM, reuse flag set -> old program runs
    put_program(5000);
    axil_write(REG_REUSE, 1);
    start_and_wait();
    chk(ims, 2, "no boot with reuse");
    chk(seen.size() > 0 ? seen[0] : 0, 1, "old program reused");
    chk(loop_error, 0, "no loop error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
