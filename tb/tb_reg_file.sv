// tb_reg_file: random writes and reads of the register file against a reference
// array. Checks asynchronous reads (both ports), write on the clock edge only when
// RegWrite is high, read-old-value in the cycle of a write, register 0 reading as
// zero whatever is written to it, and reset clearing every register.
module tb_reg_file;
  logic clk = 0, rst;
  logic [2:0]  ra1, ra2, wa;
  logic [15:0] wd, rd1, rd2;
  logic        reg_write;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst(rst), .ra1(ra1), .ra2(ra2), .wa(wa), .wd(wd),
                .reg_write(reg_write), .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < 8; r++) begin
      ra1 = 3'(r); ra2 = 3'(7 - r);
      #1;
      checks += 2;
      if (rd1 !== model[r])     begin failures++; $display("FAIL rd1 r%0d got %h exp %h", r, rd1, model[r]); end
      if (rd2 !== model[7 - r]) begin failures++; $display("FAIL rd2 r%0d got %h exp %h", 7-r, rd2, model[7-r]); end
    end
  endtask

  initial begin
    rst = 1; reg_write = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int r = 0; r < 8; r++) model[r] = 16'h0000;
    @(posedge clk); #1;
    rst = 0;
    check_reads();
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      wa = 3'($urandom); wd = 16'($urandom); reg_write = ($urandom % 4) != 0;
      ra1 = wa; ra2 = 3'($urandom);
      #1;
      // same-cycle read returns the old value
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL pre-edge rd1"); end
      if (rd2 !== model[ra2]) begin failures++; $display("FAIL pre-edge rd2"); end
      @(posedge clk);
      if (reg_write && wa != 0) model[wa] = wd;
      #1;
      checks++;
      if (rd1 !== model[ra1]) begin
        failures++;
        $display("FAIL after write r%0d got %h exp %h", ra1, rd1, model[ra1]);
      end
      if (i % 50 == 0) check_reads();
    end
    reg_write = 0;
    check_reads();
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 8; r++) model[r] = 16'h0000;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
