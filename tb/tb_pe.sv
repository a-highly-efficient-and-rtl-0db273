// tb_pe: self-checking test of one processing element.
// Drives VLIW words straight into the PE and observes it through its
// outputs: STBM writes (bm_*) expose register and LM contents, scatters
// (nb_out_*) expose results sent to neighbours. Covers LDimm, integer
// operations with register and immediate operands, FMUL / FMACCA / FMACCS
// back to back through the accumulator, LD/ST in one word, R-type store
// and scatter modes (the FMUL + LD example word of the document), operands
// from the North/East input buffers and from broadcast memory, NSG, NPASS,
// NST, BFLUSH, LDBM writes on the LM port B, STBM of the slot-1 ALU/FPU
// result of the same word, and the pipeline timing:
// scatter output 5 cycles and register write-back 6 cycles after issue.
module tb_pe;
  import dragon_pkg::*;
  import dragon_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] slot1, slot2;
  word_t bm_rdata, lm_b_wdata, bm_wdata, nb_out_data;
  logic lm_b_we, bm_we, error;
  logic [11:0] lm_b_waddr, bm_waddr;
  logic [3:0] nb_in_valid, nb_out_valid;
  word_t [3:0] nb_in_data;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  pe #(.FIFO_DEPTH(16)) dut (.clk, .rst_n, .pe_id(16'd37), .slot1, .slot2, .bm_rdata,
    .lm_b_we, .lm_b_waddr, .lm_b_wdata, .bm_we, .bm_waddr, .bm_wdata,
    .nb_in_valid, .nb_in_data, .nb_out_valid, .nb_out_data, .error);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observed outputs
  typedef struct { int t; logic [11:0] a; word_t d; } bmw_t;
  typedef struct { int t; logic [3:0] v; word_t d; } nbo_t;
  bmw_t bmq[$];
  nbo_t nbq[$];
  always @(negedge clk) begin
    if (bm_we) bmq.push_back('{cyc, bm_waddr, bm_wdata});
    if (nb_out_valid != 0) nbq.push_back('{cyc, nb_out_valid, nb_out_data});
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  int t_issue;
  task automatic issue(input logic [63:0] s1, input logic [63:0] s2 = 0);
    @(negedge clk); slot1 = s1; slot2 = s2; t_issue = cyc;
    @(negedge clk); slot1 = 0; slot2 = 0;
  endtask
  task automatic issue2(input logic [127:0] w);
    issue(w[63:0], w[127:64]);
  endtask
  task automatic gap(input int n = 7);
    repeat (n) @(negedge clk);
  endtask

  // expose a register through STBM and return the value
  task automatic peek(input int r, input string what, input logic [63:0] exp);
    bmw_t e;
    bmq.delete();
    issue(0, stbm(12'h100 + r, r));
    gap(7);
    checks++;
    if (bmq.size() != 1) begin failures++; $display("FAIL %s: %0d BM writes", what, bmq.size()); end
    else begin
      e = bmq.pop_front();
      chk(e.d, exp, what);
      chk(64'(e.a), 64'(12'h100 + r), {what, " addr"});
    end
  endtask

  initial begin
    slot1 = 0; slot2 = 0; bm_rdata = 0; lm_b_we = 0; lm_b_waddr = 0; lm_b_wdata = 0;
    nb_in_valid = 0; nb_in_data = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    // LDimm and write-back timing: a STBM issued 6 cycles later reads the new value
    issue2(ldimm(1, $realtobits(2.0)));
    gap(4);
    bmq.delete();
    issue(0, stbm(1, 1));
    gap(7);
    chk(bmq.size(), 1, "wb timing: one write");
    if (bmq.size() == 1) chk(bmq[0].d, $realtobits(2.0), "wb timing: new value after 6 cycles");
    issue2(ldimm(2, $realtobits(3.0)));
    issue2(ldimm(3, 64'h0123_4567_89AB_CDEF));
    issue2(ldimm(4, 64'd1000));
    gap();
    peek(3, "ldimm", 64'h0123_4567_89AB_CDEF);

    // integer operations
    issue(rop(OP_ADD, 10, 3, 4));
    issue(ropi(OP_SUB, 11, 4, 16'hFFFE));           // 1000 - (-2)
    issue(rop(OP_MUL, 12, 4, 4));
    issue(ropi(OP_SLL, 13, 4, 16'd4));
    issue(rop(OP_XOR, 14, 3, 4));
    issue(rop(OP_ADD, 15, 4, 0, SRC_PEID));
    gap();
    peek(10, "add", 64'h0123_4567_89AB_CDEF + 1000);
    peek(11, "subi", 1002);
    peek(12, "mul", 1000000);
    peek(13, "slli", 16000);
    peek(14, "xor", 64'h0123_4567_89AB_CDEF ^ 1000);
    peek(15, "add pe id", 1037);

    // floating point chain, back to back: 2*3 + 2*3 + 2*3 - 2*3 = 12
    issue(rop(OP_FMUL,   20, 1, 2));
    issue(rop(OP_FMACCA, 20, 1, 2));
    issue(rop(OP_FMACCA, 20, 1, 2));
    issue(rop(OP_FMACCS, 21, 1, 2));
    issue(rop(OP_FADD,   22, 1, 2));
    issue(rop(OP_FSUB,   23, 1, 2));
    gap();
    peek(20, "fmacca chain", $realtobits(18.0));
    peek(21, "fmaccs", $realtobits(12.0));
    peek(22, "fadd", $realtobits(5.0));
    peek(23, "fsub", $realtobits(-1.0));

    // ST, then an R-type store to LM with a concurrent LD in slot 2
    issue(0, st(3, 41));
    gap();
    issue(rop(OP_FMUL, 24, 1, 1, SRC_RF, MODE_RF_LM, 40), ld(25, 41));
    gap();
    issue(0, ld(26, 40));
    gap();
    peek(24, "mode1 also writes RF", $realtobits(4.0));
    peek(25, "LD beside an R-type store", 64'h0123_4567_89AB_CDEF);
    peek(26, "LD of the R-type store", $realtobits(4.0));
    // STBM from LM
    bmq.delete();
    issue(0, stbm(12'h7, 0, 1, 40));
    gap();
    chk(bmq.size(), 1, "stbm from lm count");
    if (bmq.size() == 1) chk(bmq[0].d, $realtobits(4.0), "stbm from lm");
    // STBM of the slot-1 result in the same word (ALU, then FPU)
    issue2(ldimm(28, $realtobits(2.5)));
    issue2(ldimm(29, $realtobits(4.0)));
    gap();
    bmq.delete();
    issue(ropi(OP_ADD, 27, 28, 16'd5), stbm_res(12'h20));
    issue(rop(OP_FMUL, 27, 28, 29), stbm_res(12'h21));
    gap();
    chk(bmq.size(), 2, "stbm of slot-1 result count");
    if (bmq.size() == 2) begin
      chk(bmq[0].d, $realtobits(2.5) + 64'd5, "stbm of ALU result");
      chk(bmq[1].d, $realtobits(10.0), "stbm of FPU result");
      chk(64'(bmq[1].a), 64'h21, "stbm of FPU result addr");
    end

    // the document's example word: FMUL with N-buffer operand, mode 3
    // (store to LM, scatter South), with LD in slot 2
    @(negedge clk); nb_in_valid[DIR_N] = 1; nb_in_data[DIR_N] = $realtobits(1.5);
    @(negedge clk); nb_in_valid = 0;
    issue2(ldimm(30, $realtobits(9.0)));
    gap();
    issue(0, st(30, 60));
    gap();
    nbq.delete();
    issue(rop(OP_FMUL, 4'b1000, 2, 0, SRC_NFIFO, MODE_LM_SCAT, 50), ld(31, 60));
    gap();
    chk(nbq.size(), 1, "scatter count");
    if (nbq.size() == 1) begin
      chk(64'(nbq[0].v), 64'b1000, "scatter to South");
      chk(nbq[0].d, $realtobits(4.5), "scatter data");
      chk(64'(nbq[0].t - t_issue), 5, "scatter latency");
    end
    peek(31, "LD in the example word", $realtobits(9.0));
    issue(0, ld(32, 50));
    gap();
    peek(32, "LM store of the example word", $realtobits(4.5));

    // NSG: send r3 to East and West
    nbq.delete();
    issue(0, ntype(OP_NSG, 4'b0110, 0, 3));
    gap();
    chk(nbq.size(), 1, "nsg count");
    if (nbq.size() == 1) begin
      chk(64'(nbq[0].v), 64'b0110, "nsg dirs");
      chk(nbq[0].d, 64'h0123_4567_89AB_CDEF, "nsg data");
    end

    // NPASS from the East buffer to North; NST from the West buffer to LM
    @(negedge clk);
    nb_in_valid = 4'b0110; nb_in_data[DIR_E] = 64'hE1; nb_in_data[DIR_W] = 64'hAA;
    @(negedge clk);
    nb_in_valid = 4'b0010; nb_in_data[DIR_E] = 64'hE2;
    @(negedge clk); nb_in_valid = 0;
    nbq.delete();
    issue(0, ntype(OP_NPASS, 4'b0001, 4'b0010));
    issue(0, ntype(OP_NPASS, 4'b0001, 4'b0010));
    issue(0, ntype(OP_NST, 0, 4'b0100, 0, 70));
    gap();
    chk(nbq.size(), 2, "npass count");
    if (nbq.size() == 2) begin
      chk(nbq[0].d, 64'hE1, "npass order 1");
      chk(nbq[1].d, 64'hE2, "npass order 2");
      chk(64'(nbq[1].v), 64'b0001, "npass dir");
    end
    issue(0, ld(33, 70));
    gap();
    peek(33, "nst", 64'hAA);

    // integer op with the East-buffer operand after BFLUSH: the flushed
    // word must not be used
    @(negedge clk); nb_in_valid = 4'b0010; nb_in_data[DIR_E] = 64'd5;
    @(negedge clk); nb_in_valid = 0;
    issue(0, ntype(OP_BFLUSH, 0, 4'b0010));
    @(negedge clk); nb_in_valid = 4'b0010; nb_in_data[DIR_E] = 64'd7;
    @(negedge clk); nb_in_valid = 0;
    issue(rop(OP_ADD, 34, 4, 0, SRC_EFIFO));
    gap();
    peek(34, "bflush", 1007);

    // BM operand: supply bm_rdata in EX1
    @(negedge clk); slot1 = rop(OP_ADD, 35, 4, 0, SRC_BM, MODE_RF, 0, 12'h10);
    @(negedge clk); slot1 = 0; bm_rdata = 64'd500;
    @(negedge clk); bm_rdata = 0;
    gap();
    peek(35, "bm operand", 1500);

    // LDBM port
    @(negedge clk); lm_b_we = 1; lm_b_waddr = 12'd99; lm_b_wdata = 64'hBEEF;
    @(negedge clk); lm_b_we = 0;
    issue(0, ld(36, 99));
    gap();
    peek(36, "lm port b", 64'hBEEF);

    chk(error, 0, "no error flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
