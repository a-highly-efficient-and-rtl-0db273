// tb_regfile: self-checking test of the 256 x 64 register file.
// Writes random data through both write ports, reads it back on all three
// read ports one cycle later, and checks the same-cycle write bypass and
// the priority of write port 0 over port 1 on the same register.
module tb_regfile;
  import dragon_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0][7:0] raddr;
  word_t [2:0]     rdata;
  logic [1:0]      we;
  logic [1:0][7:0] waddr;
  word_t [1:0]     wdata;
  word_t model [256];
  int checks = 0, failures = 0;

  regfile dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) model[i] = 0;
    // fill through both ports
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      we = 2'b11;
      waddr[0] = 8'(2*i);   wdata[0] = {$urandom, $urandom};
      waddr[1] = 8'(2*i+1); wdata[1] = {$urandom, $urandom};
      model[2*i] = wdata[0]; model[2*i+1] = wdata[1];
    end
    @(negedge clk); we = 0;
    // random reads
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int r = 0; r < 3; r++) raddr[r] = 8'($urandom);
      @(negedge clk);
      for (int r = 0; r < 3; r++) chk(rdata[r], model[raddr[r]], "read");
    end
    // bypass: read and write the same register in one cycle
    @(negedge clk);
    we = 2'b01; waddr[0] = 8'd42; wdata[0] = 64'h1234_5678_9ABC_DEF0; raddr[0] = 8'd42;
    model[42] = wdata[0];
    @(negedge clk); we = 0;
    chk(rdata[0], 64'h1234_5678_9ABC_DEF0, "bypass");
    // both ports on one register: port 0 wins
    we = 2'b11; waddr[0] = 8'd7; waddr[1] = 8'd7; wdata[0] = 64'hAAAA; wdata[1] = 64'hBBBB;
    @(negedge clk); we = 0; raddr[1] = 8'd7;
    @(negedge clk);
    chk(rdata[1], 64'hAAAA, "priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
