// alu: the arithmetic-logic unit of the MIPS 16 processor.
//
// Combinational 16-bit ALU with eight operations selected by the 3-bit ALUCtrl:
//   ADD  a + b                 SUB  a - b
//   SLL  b << sa               SRL  b >> sa (zeros shifted in)
//   AND  a & b                 OR   a | b
//   XOR  a ^ b                 SLT  1 if a < b as signed numbers, else 0
// The shifts act on operand B (rt), by the 1-bit shift amount of the R-type format,
// so they shift by 0 or 1 position. Zero is high when the result is 0; beq uses it
// after a subtraction. Overflow is ignored, as the lab text asks.
//
// The set of operations follows Table 1 of the lab (add, sub, sll, srl, and, or)
// plus the two R-type instructions chosen for this design (xor, slt); the
// encoding of ALUCtrl is this design's own.
module alu
  import mips16_pkg::*;
(
  input  word_t     a,         // operand A (rs)
  input  word_t     b,         // operand B (rt or extended immediate)
  input  logic      sa,        // shift amount
  input  alu_ctrl_t alu_ctrl,
  output word_t     result,
  output logic      zero
);

  always_comb begin
    unique case (alu_ctrl)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLL: result = b << sa;
      ALU_SRL: result = b >> sa;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_XOR: result = a ^ b;
      ALU_SLT: result = ($signed(a) < $signed(b)) ? word_t'(1) : word_t'(0);
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
