// tb_alu_control: exhaustive check of the ALU control over every ALUOp and function
// code, against the decoding table written out here.
module tb_alu_control;
  import mips16_pkg::*;
  alu_op_t   alu_op;
  funct_t    funct;
  alu_ctrl_t alu_ctrl;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op(alu_op), .funct(funct), .alu_ctrl(alu_ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected ALUCtrl code: add 000 sub 001 sll 010 srl 011 and 100 or 101 xor 110 slt 111
  function automatic logic [2:0] expected(logic [2:0] op, logic [2:0] fn);
    case (op)
      3'b000:  return fn;       // R-type: function codes map one to one
      3'b001:  return 3'b000;   // add
      3'b010:  return 3'b001;   // sub
      3'b011:  return 3'b100;   // and
      3'b100:  return 3'b101;   // or
      default: return 3'b000;
    endcase
  endfunction

  initial begin
    for (int op = 0; op < 5; op++) begin
      for (int fn = 0; fn < 8; fn++) begin
        alu_op = alu_op_t'(op); funct = funct_t'(fn);
        #1;
        checks++;
        if (alu_ctrl !== expected(3'(op), 3'(fn))) begin
          failures++;
          $display("FAIL aluop=%0d funct=%0d got %b", op, fn, alu_ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
