// tb_bm_bank: self-checking test of one broadcast memory bank.
// Writes through the DMA port and the accelerator port, reads back through
// both, and checks that a disabled read holds its output.
module tb_bm_bank;
  import dragon_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_ren, b_we;
  logic [11:0] a_addr, b_raddr, b_waddr;
  word_t a_wdata, a_rdata, b_rdata, b_wdata;
  word_t model [4096];
  int checks = 0, failures = 0;

  bm_bank dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
               .b_ren, .b_raddr, .b_rdata, .b_we, .b_waddr, .b_wdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    a_en = 0; a_we = 0; b_ren = 0; b_we = 0; a_addr = 0; b_raddr = 0; b_waddr = 0;
    a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 4096; i++) model[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom); b_we = 1'($urandom);
      a_addr = 12'($urandom); b_waddr = 12'($urandom);
      a_wdata = {$urandom, $urandom}; b_wdata = {$urandom, $urandom};
      if (b_we && !(a_we && a_addr == b_waddr)) model[b_waddr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0; b_ren = 1;
    for (int i = 0; i < 4096; i++) begin
      a_addr = 12'(i); b_raddr = 12'(4095 - i);
      @(negedge clk);
      chk(a_rdata, model[i], "port A read");
      chk(b_rdata, model[4095 - i], "port B read");
    end
    // hold: present an address whose word differs from the last one read
    begin
      int h;
      h = 0;
      while (model[h] == model[4095] || model[h] == model[0]) h++;
      a_en = 0; b_ren = 0; a_addr = 12'(h); b_raddr = 12'(h);
    end
    @(negedge clk);
    chk(a_rdata, model[4095], "port A hold");
    chk(b_rdata, model[0], "port B hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
