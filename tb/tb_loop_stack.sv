// tb_loop_stack: self-checking test of the REPEAT/BNZ hardware stack.
// Runs nested loops with a small program-counter model and counts how
// often each body executes, fills all seven levels, and checks the error
// flag on an eighth push.
module tb_loop_stack;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, push, bnz, taken, error;
  logic [19:0] push_cnt;
  logic [14:0] push_pc, target;
  logic [2:0]  depth;
  int checks = 0, failures = 0;

  loop_stack dut (.clk, .rst_n, .clear, .push, .push_cnt, .push_pc, .bnz, .taken, .target,
                  .depth, .error);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  // program: 0 REPEAT 3; 1 REPEAT 5; 2 body; 3 BNZ; 4 body2; 5 BNZ; 6 end
  initial begin
    int pc, inner, outer, steps;
    clear = 0; push = 0; bnz = 0; push_cnt = 0; push_pc = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    pc = 0; inner = 0; outer = 0; steps = 0;
    while (pc != 6 && steps < 1000) begin
      @(negedge clk);
      push = 0; bnz = 0;
      case (pc)
        0: begin push = 1; push_cnt = 3; push_pc = 1; pc = 1; end
        1: begin push = 1; push_cnt = 5; push_pc = 2; pc = 2; end
        2: begin inner++; pc = 3; end
        3: begin bnz = 1; #1; pc = taken ? int'(target) : 4; end
        4: begin outer++; pc = 5; end
        5: begin bnz = 1; #1; pc = taken ? int'(target) : 6; end
        default: ;
      endcase
      steps++;
    end
    @(negedge clk); push = 0; bnz = 0;
    @(negedge clk);
    chk(inner, 15, "inner body count");
    chk(outer, 3, "outer body count");
    chk(int'(depth), 0, "stack empty at end");
    chk(int'(error), 0, "no error");
    for (int i = 0; i < 7; i++) begin
      push = 1; push_cnt = 20'(i + 2); push_pc = 15'(100 + i);
      @(negedge clk);
    end
    push = 0;
    chk(int'(depth), 7, "seven levels");
    bnz = 1; #1;
    chk(int'(taken), 1, "taken");
    chk(int'(target), 106, "target of top level");
    @(negedge clk); bnz = 0;
    push = 1; @(negedge clk); push = 0;
    chk(int'(error), 1, "overflow error");
    clear = 1; @(negedge clk); clear = 0;
    chk(int'(depth), 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
