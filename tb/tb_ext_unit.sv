// tb_ext_unit: exhaustive check of the extension unit over all 128 immediates and
// both ExtOp values, against extension worked out with integer arithmetic.
module tb_ext_unit;
  logic [6:0]  imm;
  logic        ext_op;
  logic [15:0] ext_imm;
  int checks = 0, failures = 0;

  ext_unit dut (.imm(imm), .ext_op(ext_op), .ext_imm(ext_imm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    logic [15:0] exp;
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 128; i++) begin
        imm = 7'(i); ext_op = e[0];
        #1;
        // signed value of a 7-bit field: i - 128 when i >= 64
        v   = (e == 1 && i >= 64) ? i - 128 : i;
        exp = 16'(v);
        checks++;
        if (ext_imm !== exp) begin
          failures++;
          $display("FAIL imm=%0d ext_op=%0d got %h expected %h", i, e, ext_imm, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
