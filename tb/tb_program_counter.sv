// tb_program_counter: checks that the PC clears on reset and loads next_pc on each
// rising edge, with random next_pc values, and holds its value between edges.
module tb_program_counter;
  logic clk = 0, rst;
  logic [15:0] next_pc, pc;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .next_pc(next_pc), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    rst = 1; next_pc = 16'h1234;
    @(posedge clk); #1;
    checks++; if (pc !== 16'h0000) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] prev;
      prev = pc;
      v = 16'($urandom);
      next_pc = v;
      #2;
      checks++;
      if (pc !== prev) begin failures++; $display("FAIL pc changed between edges"); end
      @(posedge clk); #1;
      checks++;
      if (pc !== v) begin failures++; $display("FAIL load: pc=%h expected %h", pc, v); end
    end
    rst = 1;
    @(posedge clk); #1;
    checks++; if (pc !== 16'h0000) begin failures++; $display("FAIL reset2 pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
