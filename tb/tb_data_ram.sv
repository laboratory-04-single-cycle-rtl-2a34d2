// tb_data_ram: random writes and reads of the data memory against a reference
// array. Checks the combinational read, the write on the clock edge only when
// MemWrite is high, and that the address wraps modulo the depth.
module tb_data_ram;
  localparam int DEPTH = 256;
  logic clk = 0;
  logic [15:0] addr, wd, rd;
  logic        mem_write;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_ram dut (.clk(clk), .addr(addr), .wd(wd), .mem_write(mem_write), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_write = 0; addr = 0; wd = 0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      addr = 16'(a); wd = 16'($urandom); mem_write = 1;
      model[a] = wd;
      @(posedge clk);
    end
    @(negedge clk); mem_write = 0;
    for (int a = 0; a < DEPTH; a++) begin
      addr = 16'(a); #1;
      checks++;
      if (rd !== model[a]) begin failures++; $display("FAIL read %0d got %h exp %h", a, rd, model[a]); end
    end
    // random mixed traffic, with random upper address bits
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = 16'($urandom); wd = 16'($urandom); mem_write = ($urandom % 2) != 0;
      #1;
      checks++;
      if (rd !== model[addr % DEPTH]) begin failures++; $display("FAIL pre-edge read %h", addr); end
      @(posedge clk);
      if (mem_write) model[addr % DEPTH] = wd;
      #1;
      checks++;
      if (rd !== model[addr % DEPTH]) begin failures++; $display("FAIL post-edge read %h", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
