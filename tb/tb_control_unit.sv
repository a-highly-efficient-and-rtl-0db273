// tb_control_unit: self-checking test of the sequencer's control unit.
// An IM model (one-cycle read) holds a program with two nested REPEAT
// loops (BNZ followed by its NOP delay slot), an RDGMEM that must stall
// the program until the DMA model drops busy, a WRGMEM, straight-line code
// and STOP. Checks the order of the words sent on the slot streams, that
// straight-line words issue one per cycle, the DMA command frames, the
// stall, the boot request (and its bypass with the reuse flag) and the
// ready/done handshake.
module tb_control_unit;
  import dragon_pkg::*;
  import dragon_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ap_start, reuse, ap_ready, ap_done, ap_idle, imdma_start, imdma_done, im_re;
  logic [11:0] im_line;
  logic [2:0] im_offset;
  logic [63:0] im_slot1, im_slot2, dc, ms;
  logic dma_cmd_valid, dma_busy, loop_error;
  dma_cmd_t dma_cmd;
  logic [127:0] prog [64];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  control_unit dut (.clk, .rst_n, .ap_start, .reuse, .ap_ready, .ap_done, .ap_idle,
    .imdma_start, .imdma_done, .im_re, .im_line, .im_offset, .im_slot1, .im_slot2,
    .dc_slot_stream(dc), .mem_slot_stream(ms), .dma_cmd_valid, .dma_cmd, .dma_busy, .loop_error);

  always_ff @(posedge clk) if (im_re) {im_slot2, im_slot1} <= prog[{im_line[2:0], im_offset}];

  // DMA model: busy for 20 cycles after each command
  int busy_left = 0;
  dma_cmd_t cmds[$];
  int cmd_t[$];
  always @(posedge clk) begin
    if (dma_cmd_valid) begin busy_left = 20; cmds.push_back(dma_cmd); cmd_t.push_back(cyc); end
    else if (busy_left > 0) busy_left--;
  end
  assign dma_busy = busy_left > 0;

  // boot model
  int boots = 0;
  always @(posedge clk) begin
    imdma_done <= 0;
    if (imdma_start) begin boots++; repeat (5) @(posedge clk); imdma_done <= 1; end
  end

  // observed stream
  int seen[$];
  int seen_t[$];
  always @(negedge clk) if (dc != 0) begin seen.push_back(int'(dc[15:0])); seen_t.push_back(cyc); end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  // a recognisable accelerator word: ADD with tag in its low bits
  function automatic logic [127:0] w(int tag);
    return vliw({6'(OP_ADD), 42'd0, 16'(tag)}, 64'(tag));
  endfunction

  int exp_seq[$];
  task automatic run_once(input logic re);
    seen.delete(); seen_t.delete(); cmds.delete(); cmd_t.delete();
    @(negedge clk); reuse = re; ap_start = 1;
    while (!ap_ready) @(negedge clk);
    ap_start = 0;
    while (!ap_done) @(negedge clk);
    @(negedge clk);
    chk(seen.size(), exp_seq.size(), "stream length");
    foreach (exp_seq[i]) if (i < seen.size()) chk(seen[i], exp_seq[i], "stream order");
  endtask

  initial begin
    int pc;
    ap_start = 0; reuse = 0;
    for (int i = 0; i < 64; i++) prog[i] = '0;
    pc = 0;
    prog[pc++] = w(1);
    prog[pc++] = vliw(ctl(FN_REPEAT, 3), 0);
    prog[pc++] =   w(2);
    prog[pc++] =   vliw(ctl(FN_REPEAT, 2), 0);
    prog[pc++] =     w(3);
    prog[pc++] =     w(4);
    prog[pc++] =   vliw(ctl(FN_BNZ), 0);
    prog[pc++] =   0;                                     // delay slot
    prog[pc++] = vliw(ctl(FN_BNZ), 0);
    prog[pc++] = 0;                                       // delay slot
    prog[pc++] = gmem(0, 16, 12'h20, 64'h1_0000_0080);
    prog[pc++] = w(5);
    prog[pc++] = w(6);
    prog[pc++] = w(7);
    prog[pc++] = gmem(1, 4, 12'h30, 64'h100);
    prog[pc++] = vliw(ctl(FN_STOP), 0);
    exp_seq = '{1, 2, 3, 4, 3, 4, 2, 3, 4, 3, 4, 2, 3, 4, 3, 4, 5, 6, 7};
    repeat (3) @(negedge clk); rst_n = 1;
    chk(ap_idle, 1, "idle");
    run_once(0);
    chk(boots, 1, "boot requested");
    chk(cmds.size(), 2, "dma commands");
    if (cmds.size() == 2) begin
      chk(cmds[0].write, 0, "rdgmem dir");
      chk(cmds[0].beats, 16, "rdgmem beats");
      chk(cmds[0].bm_off, 12'h20, "rdgmem bm offset");
      chk(cmds[0].gm_off, 64'h1_0000_0080, "rdgmem gm offset");
      chk(cmds[1].write, 1, "wrgmem dir");
      chk(cmds[1].beats, 4, "wrgmem beats");
      // word 5 must wait until the DMA is done (busy 20 cycles)
      if (seen_t.size() > 16) chk(seen_t[16] - cmd_t[0] >= 20, 1, "stall until dma done");
    end
    // straight-line words 5, 6, 7 issue on consecutive cycles
    if (seen_t.size() == 19) begin
      chk(seen_t[17] - seen_t[16], 1, "one word per cycle");
      chk(seen_t[18] - seen_t[17], 1, "one word per cycle");
      // loop back-edge costs the BNZ word and its delay slot
      chk(seen_t[4] - seen_t[3], 3, "inner loop back edge");
    end
    chk(loop_error, 0, "no loop error");
    chk(ap_idle, 1, "idle after stop");
    run_once(1);
    chk(boots, 1, "boot bypassed with reuse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
