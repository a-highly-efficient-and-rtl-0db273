// tb_instr_mem: self-checking test of the instruction memory.
// Writes random 1024-bit lines, then reads every instruction of a set of
// lines through the line/offset pointers and checks both slots against
// the bits of the written line (instruction k at [128k+127:128k], slot 1
// in the low half), with the one-cycle read latency.
module tb_instr_mem;
  import dragon_pkg::*;
  localparam int L = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [5:0] waddr, line_ptr;
  logic [GM_DW-1:0] wdata;
  logic [2:0] offset_ptr;
  logic [63:0] slot1, slot2;
  logic [GM_DW-1:0] model [L];
  int checks = 0, failures = 0;

  instr_mem #(.LINES(L)) dut (.clk, .we, .waddr, .wdata, .re, .line_ptr, .offset_ptr, .slot1, .slot2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    we = 0; re = 0; waddr = 0; line_ptr = 0; offset_ptr = 0; wdata = 0;
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i);
      for (int w = 0; w < 32; w++) wdata[32*w +: 32] = $urandom;
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < L; i++) begin
      for (int k = 0; k < 8; k++) begin
        re = 1; line_ptr = 6'(i); offset_ptr = 3'(k);
        @(negedge clk);
        chk(slot1, model[i][128*k +: 64], "slot1");
        chk(slot2, model[i][128*k + 64 +: 64], "slot2");
      end
    end
    // disabled read holds the output
    re = 0; line_ptr = 0; offset_ptr = 0;
    @(negedge clk);
    chk(slot1, model[L-1][128*7 +: 64], "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
