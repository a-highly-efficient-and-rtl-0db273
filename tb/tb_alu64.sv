// tb_alu64: self-checking test of the 64-bit integer ALU.
// Drives random operands through all eight integer operations and one
// non-integer opcode, and compares with results computed here.
module tb_alu64;
  import dragon_pkg::*;
  opcode_e op;
  word_t a, b, y, exp_y;
  int checks = 0, failures = 0;

  alu64 dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_e ops [9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_MUL, OP_FADD};
    for (int i = 0; i < 400; i++) begin
      op = ops[i % 9];
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      if (i < 9) begin a = 64'hFFFF_FFFF_FFFF_FFFF; b = 64'h0000_0001_FFFF_FFFF; end
      #1;
      case (op)
        OP_ADD: exp_y = a + b;
        OP_SUB: exp_y = a - b;
        OP_AND: exp_y = a & b;
        OP_OR:  exp_y = a | b;
        OP_XOR: exp_y = a ^ b;
        OP_SLL: exp_y = a << (b % 64);
        OP_SRL: exp_y = a >> (b % 64);
        OP_MUL: exp_y = {32'd0, a[31:0]} * {32'd0, b[31:0]};
        default: exp_y = 0;
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
