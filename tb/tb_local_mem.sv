// tb_local_mem: self-checking test of the PE local memory.
// Writes through port A and port B, reads through port A with its one-cycle
// latency, checks that a read and a write in one cycle both happen and
// that port A wins when both ports write one address.
module tb_local_mem;
  import dragon_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [11:0] a_raddr, a_waddr, b_waddr;
  word_t a_rdata, a_wdata, b_wdata;
  logic a_we, b_we;
  word_t model [4096];
  int checks = 0, failures = 0;

  local_mem dut (.clk, .a_raddr, .a_rdata, .a_we, .a_waddr, .a_wdata, .b_we, .b_waddr, .b_wdata);

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
    a_we = 0; b_we = 0; a_raddr = 0; a_waddr = 0; b_waddr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 4096; i++) model[i] = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_waddr = 12'($urandom); b_waddr = 12'($urandom);
      a_wdata = {$urandom, $urandom}; b_wdata = {$urandom, $urandom};
      if (b_we && !(a_we && a_waddr == b_waddr)) model[b_waddr] = b_wdata;
      if (a_we) model[a_waddr] = a_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int i = 0; i < 4096; i++) begin
      a_raddr = 12'(i);
      @(negedge clk);
      chk(a_rdata, model[i], "read");
    end
    // read-during-write returns the old word, the new word lands
    a_raddr = 12'd5; a_we = 1; a_waddr = 12'd5; a_wdata = 64'hCAFE;
    @(negedge clk); a_we = 0;
    chk(a_rdata, model[5], "old on collision");
    @(negedge clk);
    chk(a_rdata, 64'hCAFE, "new after collision");
    // both ports on one address
    a_we = 1; b_we = 1; a_waddr = 12'd9; b_waddr = 12'd9; a_wdata = 64'h1; b_wdata = 64'h2;
    @(negedge clk); a_we = 0; b_we = 0; a_raddr = 12'd9;
    @(negedge clk);
    chk(a_rdata, 64'h1, "port A wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
