// tb_alu: random and corner-case operands for all eight ALU operations, compared
// with results computed here with 32-bit integer arithmetic, plus the Zero flag.
module tb_alu;
  import mips16_pkg::*;
  logic [15:0] a, b, result;
  logic        sa, zero;
  alu_ctrl_t   alu_ctrl;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .sa(sa), .alu_ctrl(alu_ctrl), .result(result), .zero(zero));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expected(int op, logic [15:0] x, logic [15:0] y, logic s);
    int ix, iy, sx, sy;
    ix = int'(x); iy = int'(y);
    sx = (ix >= 32768) ? ix - 65536 : ix;
    sy = (iy >= 32768) ? iy - 65536 : iy;
    case (op)
      0: return 16'((ix + iy) % 65536);
      1: return 16'((ix - iy + 65536) % 65536);
      2: return s ? 16'((iy * 2) % 65536) : y;
      3: return s ? 16'(iy / 2) : y;
      4: return x & y;
      5: return x | y;
      6: return x ^ y;
      default: return (sx < sy) ? 16'd1 : 16'd0;
    endcase
  endfunction

  task automatic run(int op, logic [15:0] x, logic [15:0] y, logic s);
    logic [15:0] e;
    a = x; b = y; sa = s; alu_ctrl = alu_ctrl_t'(op);
    #1;
    e = expected(op, x, y, s);
    checks += 2;
    if (result !== e) begin
      failures++;
      $display("FAIL op%0d a=%h b=%h sa=%0d got %h exp %h", op, x, y, s, result, e);
    end
    if (zero !== (e == 16'h0000)) begin
      failures++;
      $display("FAIL zero op%0d a=%h b=%h", op, x, y);
    end
  endtask

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h1234};
    for (int op = 0; op < 8; op++) begin
      foreach (corners[i]) foreach (corners[j]) begin
        run(op, corners[i], corners[j], 1'b0);
        run(op, corners[i], corners[j], 1'b1);
      end
      for (int k = 0; k < 500; k++) run(op, 16'($urandom), 16'($urandom), 1'($urandom));
      run(op, 16'h5555, 16'h5555, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
