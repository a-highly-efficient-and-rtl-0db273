// tb_broadcast_cluster: self-checking test of one broadcast cluster.
// Fills the 16 BM banks through the DMA port, then runs a short SIMD
// program on all 16 PEs: LDBM (parallel and broadcast), LD, scatter to the
// East and to the South neighbour, add the word gathered from the West /
// North input buffer, add a broadcast BM operand, STBM, and reads the
// results back through the DMA port. Edge PEs receive words driven on the
// cluster's west/north edge inputs, and the words leaving the east/south
// edges are checked.
module tb_broadcast_cluster;
  import dragon_pkg::*;
  import dragon_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] slot1, slot2;
  logic dma_en, dma_we, error, bmc_busy;
  logic [11:0] dma_addr;
  logic [GM_DW-1:0] dma_wdata, dma_rdata;
  logic  [3:0] n_in_valid, s_in_valid, e_in_valid, w_in_valid;
  word_t [3:0] n_in_data, s_in_data, e_in_data, w_in_data;
  logic  [3:0] n_out_valid, s_out_valid, e_out_valid, w_out_valid;
  word_t [3:0] n_out_data, s_out_data, e_out_data, w_out_data;
  int checks = 0, failures = 0;

  broadcast_cluster #(.FIFO_DEPTH(16)) dut (.clk, .rst_n, .pe_id_base(16'd0), .row_stride(16'd4),
    .slot1, .slot2, .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata,
    .n_in_valid, .s_in_valid, .e_in_valid, .w_in_valid,
    .n_in_data, .s_in_data, .e_in_data, .w_in_data,
    .n_out_valid, .s_out_valid, .e_out_valid, .w_out_valid,
    .n_out_data, .s_out_data, .e_out_data, .w_out_data, .error, .bmc_busy);

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

  task automatic issue(input logic [63:0] s1, input logic [63:0] s2 = 0);
    @(negedge clk); slot1 = s1; slot2 = s2;
    @(negedge clk); slot1 = 0; slot2 = 0;
  endtask
  task automatic gap(input int n = 8);
    repeat (n) @(negedge clk);
  endtask

  function automatic word_t bmval(int k, int a);
    return 64'((k + 1) * 10 + a);
  endfunction

  task automatic dma_read(input int a, output logic [GM_DW-1:0] d);
    @(negedge clk); dma_en = 1; dma_we = 0; dma_addr = 12'(a);
    @(negedge clk); dma_en = 0; d = dma_rdata;
  endtask

  // edge outputs
  word_t e_seen [4], s_seen [4];
  int    e_cnt = 0, s_cnt = 0;
  always @(negedge clk) for (int i = 0; i < 4; i++) begin
    if (e_out_valid[i]) begin e_seen[i] = e_out_data[i]; e_cnt++; end
    if (s_out_valid[i]) begin s_seen[i] = s_out_data[i]; s_cnt++; end
  end

  initial begin
    logic [GM_DW-1:0] d;
    slot1 = 0; slot2 = 0; dma_en = 0; dma_we = 0; dma_addr = 0; dma_wdata = 0;
    n_in_valid = 0; s_in_valid = 0; e_in_valid = 0; w_in_valid = 0;
    n_in_data = '0; s_in_data = '0; e_in_data = '0; w_in_data = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 4; a++) begin
      @(negedge clk); dma_en = 1; dma_we = 1; dma_addr = 12'(a);
      for (int k = 0; k < 16; k++) dma_wdata[64*k +: 64] = bmval(k, a);
    end
    @(negedge clk); dma_en = 0; dma_we = 0;
    // edge inputs for column 0 (West) and row 0 (North)
    for (int i = 0; i < 4; i++) begin w_in_data[i] = 64'(1000 + i); n_in_data[i] = 64'(2000 + i); end
    w_in_valid = '1; n_in_valid = '1;
    @(negedge clk); w_in_valid = 0; n_in_valid = 0;

    issue(0, ldbm(0, 0, 4));                       // LM[0..3] <- own bank [0..3]
    gap();
    issue(0, ldbm(10, 2, 1, 0, 0, 1, 5));          // LM[10] <- bank 5 [2], all PEs
    gap();
    issue(0, ld(1, 0));
    issue(0, ld(3, 10));
    gap();
    issue(0, ntype(OP_NSG, 4'b0010, 0, 1));        // r1 -> East
    issue(0, ntype(OP_NSG, 4'b1000, 0, 1));        // r1 -> South
    gap();
    issue(rop(OP_ADD, 2, 1, 0, SRC_WFIFO));        // r2 = r1 + west word
    issue(rop(OP_ADD, 5, 1, 0, SRC_NFIFO));        // r5 = r1 + north word
    issue(rop(OP_ADD, 4, 1, 0, SRC_BMBC, MODE_RF, 0, 3, 2)); // r4 = r1 + bank2[3]
    gap();
    issue(0, stbm(100, 2));
    issue(0, stbm(101, 3));
    issue(0, stbm(102, 4));
    issue(0, stbm(103, 5));
    gap();
    dma_read(100, d);
    for (int k = 0; k < 16; k++)
      chk(d[64*k +: 64], bmval(k, 0) + ((k % 4 == 0) ? 64'(1000 + k / 4) : bmval(k - 1, 0)), "east scatter + west gather");
    dma_read(101, d);
    for (int k = 0; k < 16; k++) chk(d[64*k +: 64], bmval(5, 2), "broadcast LDBM");
    dma_read(102, d);
    for (int k = 0; k < 16; k++) chk(d[64*k +: 64], bmval(k, 0) + bmval(2, 3), "broadcast operand");
    dma_read(103, d);
    for (int k = 0; k < 16; k++)
      chk(d[64*k +: 64], bmval(k, 0) + ((k < 4) ? 64'(2000 + k) : bmval(k - 4, 0)), "south scatter + north gather");
    chk(e_cnt, 4, "east edge words");
    chk(s_cnt, 4, "south edge words");
    for (int i = 0; i < 4; i++) begin
      chk(e_seen[i], bmval(4 * i + 3, 0), "east edge data");
      chk(s_seen[i], bmval(12 + i, 0), "south edge data");
    end
    chk(error, 0, "no error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
