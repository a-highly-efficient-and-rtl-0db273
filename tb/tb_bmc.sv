// tb_bmc: self-checking test of the broadcast memory controller.
// Sixteen bank models hold known words (bank k, address a -> k*65536+a).
// Checks R-type operand reads in parallel mode (each PE its own bank) and
// broadcast mode (all PEs the bank named by BrOffset) one cycle after
// decode, and LDBM bursts: count, addresses, the Mask_load subset (first
// PE, number of PEs, 0 = all) and broadcast from one bank, with the burst
// taking count+1 cycles.
module tb_bmc;
  import dragon_pkg::*;
  import dragon_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] slot1, slot2;
  logic b_ren, busy;
  logic [11:0] b_raddr, lm_waddr;
  word_t [15:0] b_rdata, pe_rdata, lm_wdata;
  logic [15:0] lm_we;
  int checks = 0, failures = 0;

  bmc dut (.clk, .rst_n, .slot1, .slot2, .b_ren, .b_raddr, .b_rdata, .pe_rdata, .lm_we,
           .lm_waddr, .lm_wdata, .busy);

  always_ff @(posedge clk)
    if (b_ren) for (int k = 0; k < 16; k++) b_rdata[k] <= 64'(k * 65536 + int'(b_raddr));

  // LM models
  word_t lm [16][int];
  always @(posedge clk)
    for (int k = 0; k < 16; k++) if (lm_we[k]) lm[k][int'(lm_waddr)] = lm_wdata[k];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  task automatic burst(input int lmaddr, input int bmaddr, input int count, input int first,
                       input int num, input logic bc, input int broff);
    int n, cycles;
    for (int k = 0; k < 16; k++) lm[k].delete();
    @(negedge clk); slot2 = ldbm(lmaddr, bmaddr, count, first, num, bc, broff);
    @(negedge clk); slot2 = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
    @(negedge clk);
    chk(cycles, count + 1, "burst cycles from decode to last read");
    n = (num == 0) ? 16 : num;
    for (int k = 0; k < 16; k++) begin
      logic sel;
      sel = (k >= first) && (k < first + n);
      chk(lm[k].size(), sel ? count : 0, "words per PE");
      if (sel)
        for (int i = 0; i < count; i++)
          chk(lm[k].exists(lmaddr + i) ? lm[k][lmaddr + i] : 64'hDEAD,
              64'((bc ? broff : k) * 65536 + bmaddr + i), "burst word");
    end
  endtask

  initial begin
    slot1 = 0; slot2 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // operand reads
    @(negedge clk); slot1 = rop(OP_FADD, 1, 2, 0, SRC_BM, MODE_RF, 0, 12'h123);
    @(negedge clk); slot1 = rop(OP_ADD, 1, 2, 0, SRC_BMBC, MODE_RF, 0, 12'h456, 9);
    for (int k = 0; k < 16; k++) chk(pe_rdata[k], 64'(k * 65536 + 'h123), "parallel operand");
    @(negedge clk); slot1 = 0;
    for (int k = 0; k < 16; k++) chk(pe_rdata[k], 64'(9 * 65536 + 'h456), "broadcast operand");
    // bursts
    burst(10, 100, 8, 0, 0, 0, 0);
    burst(0, 4000, 5, 4, 3, 0, 0);
    burst(200, 7, 12, 0, 0, 1, 15);
    burst(3, 3, 1, 15, 1, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
