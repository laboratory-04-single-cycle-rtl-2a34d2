// main_control: the main control unit of the MIPS 16 processor.
//
// Decodes the 3-bit opcode into the data-path control signals of the single-cycle
// processor (the signal names are those of the lectures' MIPS data-path):
//
//   instr  RegDst ExtOp ALUSrc Branch Jump ALUOp  MemWrite MemtoReg RegWrite
//   R-type   1      0     0      0     0   RTYPE     0        0        1
//   addi     0      1     1      0     0   ADD       0        0        1
//   lw       0      1     1      0     0   ADD       0        1        1
//   sw       0      1     1      0     0   ADD       1        0        0
//   beq      0      1     0      1     0   SUB       0        0        0
//   andi     0      0     1      0     0   AND       0        0        1
//   ori      0      0     1      0     0   OR        0        0        1
//   j        0      0     0      0     1   ADD       0        0        0
//
// Signals that do not matter for an instruction are driven to 0. The opcode
// assignment and the choice of andi and ori as the two extra I-type instructions are
// this design's own. Purely combinational.
module main_control
  import mips16_pkg::*;
(
  input  opcode_t opcode,
  output ctrl_t   ctrl
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, ext_op: 1'b0, alu_src: 1'b0, branch: 1'b0, jump: 1'b0,
             alu_op: ALUOP_ADD, mem_write: 1'b0, mem_to_reg: 1'b0, reg_write: 1'b0};
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.alu_op    = ALUOP_RTYPE;
        ctrl.reg_write = 1'b1;
      end
      OP_ADDI: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_LW: begin
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op = 1'b1;
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_ANDI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALUOP_AND;
        ctrl.reg_write = 1'b1;
      end
      OP_ORI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALUOP_OR;
        ctrl.reg_write = 1'b1;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
