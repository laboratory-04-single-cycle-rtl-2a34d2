// alu_control: the ALU control unit of the MIPS 16 processor.
//
// Two-level decoding as in the lectures' MIPS data-path: the main control gives a
// 3-bit ALUOp per opcode, and this unit turns it into the ALU's 3-bit ALUCtrl. For
// R-type instructions (ALUOp = RTYPE) the operation comes from the function field;
// for the others ALUOp names the operation directly (add for addi/lw/sw, sub for
// beq, and for andi, or for ori).
//
// The split into ALUOp and ALUCtrl follows the lecture scheme the lab refers to; the
// widths and codes are this design's own. Purely combinational.
module alu_control
  import mips16_pkg::*;
(
  input  alu_op_t   alu_op,
  input  funct_t    funct,
  output alu_ctrl_t alu_ctrl
);

  always_comb begin
    unique case (alu_op)
      ALUOP_RTYPE: begin
        unique case (funct)
          FN_ADD:  alu_ctrl = ALU_ADD;
          FN_SUB:  alu_ctrl = ALU_SUB;
          FN_SLL:  alu_ctrl = ALU_SLL;
          FN_SRL:  alu_ctrl = ALU_SRL;
          FN_AND:  alu_ctrl = ALU_AND;
          FN_OR:   alu_ctrl = ALU_OR;
          FN_XOR:  alu_ctrl = ALU_XOR;
          FN_SLT:  alu_ctrl = ALU_SLT;
          default: alu_ctrl = ALU_ADD;
        endcase
      end
      ALUOP_ADD: alu_ctrl = ALU_ADD;
      ALUOP_SUB: alu_ctrl = ALU_SUB;
      ALUOP_AND: alu_ctrl = ALU_AND;
      ALUOP_OR:  alu_ctrl = ALU_OR;
      default:   alu_ctrl = ALU_ADD;
    endcase
  end

endmodule
