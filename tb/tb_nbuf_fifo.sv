// tb_nbuf_fifo: self-checking test of the neighbour input buffer.
// Random pushes and pops against a queue model (with wrap-around of the
// cyclic pointers), then overflow, flush and underflow.
module tb_nbuf_fifo;
  import dragon_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, in_valid, pop, empty, overflow, underflow;
  word_t in_data, head;
  logic [4:0] count;
  word_t q[$];
  int checks = 0, failures = 0;

  nbuf_fifo #(.DEPTH(D)) dut (.clk, .rst_n, .flush, .in_valid, .in_data, .pop, .head,
                              .empty, .count, .overflow, .underflow);

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

  initial begin
    flush = 0; in_valid = 0; pop = 0; in_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(64'(count), 64'(q.size()), "count");
      if (q.size() > 0) chk(head, q[0], "head");
      in_valid = ($urandom % 3 != 0) && q.size() < D;
      pop      = ($urandom % 2 == 0) && q.size() > 0;
      in_data  = {$urandom, $urandom};
      @(posedge clk); #1;
      if (pop) void'(q.pop_front());
      if (in_valid) q.push_back(in_data);
      in_valid = 0; pop = 0;
    end
    chk(64'(overflow), 0, "no overflow");
    chk(64'(underflow), 0, "no underflow");
    // fill up and overflow
    @(negedge clk);
    while (q.size() < D) begin
      in_valid = 1; in_data = {$urandom, $urandom};
      @(posedge clk); #1; q.push_back(in_data); in_valid = 0;
    end
    in_valid = 1; @(posedge clk); #1; in_valid = 0;
    chk(64'(overflow), 1, "overflow");
    chk(64'(count), D, "full count");
    chk(head, q[0], "head after overflow");
    // flush
    flush = 1; @(posedge clk); #1; flush = 0; q.delete();
    chk(64'(empty), 1, "flush empties");
    pop = 1; @(posedge clk); #1; pop = 0;
    chk(64'(underflow), 1, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
