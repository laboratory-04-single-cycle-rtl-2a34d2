// tb_rom_tracer: applies step pulses at random cycles and checks that the address
// advances by exactly one per pulse, holds otherwise, and that the instruction shown
// is the reference program word at that address; also checks reset.
module tb_rom_tracer;
  import mips16_tb_pkg::*;
  logic clk = 0, rst, step;
  logic [15:0] addr, instr;
  int checks = 0, failures = 0;
  int exp_addr;

  rom_tracer dut (.clk(clk), .rst(rst), .step(step), .addr(addr), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; step = 0;
    @(posedge clk); #1;
    rst = 0; exp_addr = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      step = ($urandom % 3) == 0;
      @(posedge clk);
      if (step) exp_addr = (exp_addr + 1) % 65536;
      #1;
      checks += 2;
      if (addr !== 16'(exp_addr)) begin failures++; $display("FAIL addr %0d exp %0d", addr, exp_addr); end
      if (instr !== ref_program(exp_addr % 256)) begin failures++; $display("FAIL instr at %0d", exp_addr); end
    end
    @(negedge clk); step = 1; rst = 1;
    @(posedge clk); #1;
    checks++;
    if (addr !== 16'h0000) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
