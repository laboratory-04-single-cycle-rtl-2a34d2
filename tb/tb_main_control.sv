// tb_main_control: checks the control signals for each of the eight opcodes against
// the control table written out here bit by bit.
module tb_main_control;
  import mips16_pkg::*;
  opcode_t opcode;
  ctrl_t   ctrl;
  int checks = 0, failures = 0;

  main_control dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {RegDst, ExtOp, ALUSrc, Branch, Jump, ALUOp[2:0], MemWrite, MemtoReg, RegWrite}
  function automatic logic [10:0] expected(int op);
    case (op)
      0: return 11'b1_0_0_0_0_000_0_0_1;  // R-type
      1: return 11'b0_1_1_0_0_001_0_0_1;  // addi
      2: return 11'b0_1_1_0_0_001_0_1_1;  // lw
      3: return 11'b0_1_1_0_0_001_1_0_0;  // sw
      4: return 11'b0_1_0_1_0_010_0_0_0;  // beq
      5: return 11'b0_0_1_0_0_011_0_0_1;  // andi
      6: return 11'b0_0_1_0_0_100_0_0_1;  // ori
      default: return 11'b0_0_0_0_1_001_0_0_0;  // j
    endcase
  endfunction

  initial begin
    for (int op = 0; op < 8; op++) begin
      logic [10:0] got;
      opcode = opcode_t'(op);
      #1;
      got = {ctrl.reg_dst, ctrl.ext_op, ctrl.alu_src, ctrl.branch, ctrl.jump,
             ctrl.alu_op, ctrl.mem_write, ctrl.mem_to_reg, ctrl.reg_write};
      checks++;
      if (got !== expected(op)) begin
        failures++;
        $display("FAIL opcode %0d: got %b expected %b", op, got, expected(op));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
