// tb_instr_rom: checks every word of the instruction ROM against the hand-assembled
// reference program, and that words past the program, including addresses that
// wrap past the ROM depth, read as 0 (a no-op).
module tb_instr_rom;
  import mips16_tb_pkg::*;

  logic [15:0] addr, instr;
  int checks = 0, failures = 0;

  instr_rom dut (.addr(addr), .instr(instr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] a, logic [15:0] exp);
    addr = a;
    #1;
    checks++;
    if (instr !== exp) begin
      failures++;
      $display("FAIL addr %0d: got %b expected %b", a, instr, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) check(16'(a), ref_program(a));
    // upper address bits are ignored: address 256+k reads word k
    for (int a = 0; a < PROG_LEN; a++) check(16'(256 + a), ref_program(a));
    check(16'hFF00 + 16'd9, ref_program(9));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
