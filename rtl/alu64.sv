// alu64: 64-bit integer ALU of the DRAGON processing element.
//
// Purely combinational. Supports the eight integer operations of the
// instruction set: ADD, SUB, AND, OR, XOR, SLL, SRL and MUL, where MUL
// multiplies the lower 32 bits of both operands into a 64-bit product, as
// the instruction set defines it. Shifts use b[5:0] as the amount (own
// choice; the shift-amount width is not specified). Any other opcode
// gives zero. The PE registers the result into its pipeline so that it
// leaves the EX3 stage together with FPU results.
module alu64
  import dragon_pkg::*;
(
  input  opcode_e     op,
  input  word_t       a,
  input  word_t       b,
  output word_t       y
);
  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[5:0];
      OP_SRL:  y = a >> b[5:0];
      OP_MUL:  y = 64'(a[31:0]) * 64'(b[31:0]);
      default: y = '0;
    endcase
  end
endmodule
