// tb_mips16_top: end-to-end test of the single-cycle MIPS 16 processor at its
// default sizes.
//
// Runs the test program held in the instruction ROM. A reference instruction-set
// model written here (its own field decoding and semantics, its own copy of the
// program) executes in lock step; every cycle the testbench compares the PC, the
// instruction, the next PC, every register write-back and every memory write with
// the model. One instruction per cycle is checked by requiring the program to reach
// its halt loop after exactly the model's instruction count. At the end the final
// registers and memory words are compared with values worked out by hand. Meanwhile the ROM tracer is stepped by random pulses
// and its output compared with the reference program.
//
// Each mechanism of the processor is counted: beq taken and not taken, j, lw, sw,
// sign and zero extension of the immediate, shifts, slt, a write to $0 being
// ignored, and tracer steps. A mechanism that never occurs counts as a failure.
module tb_mips16_top;
  import mips16_pkg::*;
  import mips16_tb_pkg::*;

  logic clk = 0, rst;
  word_t pc, instr, next_pc, rd1, rd2, ext_imm, alu_res, mem_rd, wb_data;
  reg_addr_t wb_addr;
  ctrl_t ctrl;
  logic trace_step;
  word_t trace_addr, trace_instr;

  int checks = 0, failures = 0;

  mips16_top dut (
    .clk(clk), .rst(rst),
    .pc(pc), .instr(instr), .next_pc(next_pc), .rd1(rd1), .rd2(rd2), .ext_imm(ext_imm),
    .alu_res(alu_res), .mem_rd(mem_rd), .wb_data(wb_data), .wb_addr(wb_addr), .ctrl(ctrl),
    .trace_step(trace_step), .trace_addr(trace_addr), .trace_instr(trace_instr)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference model
  logic [15:0] m_pc;
  logic [15:0] m_reg [8];
  logic [15:0] m_mem [256];
  logic        m_mem_valid [256];

  // per-instruction results of the model
  logic        e_reg_we, e_mem_we;
  logic [2:0]  e_reg_a;
  logic [15:0] e_reg_d, e_mem_a, e_mem_d, e_next;

  // mechanism counters
  int n_beq_taken, n_beq_not, n_jump, n_load, n_store, n_sext_neg, n_zext_high,
      n_shift, n_slt, n_r0_write, n_trace;

  function automatic logic [15:0] sx7(logic [6:0] v);
    return v[6] ? 16'(int'(v) - 128) : 16'(v);
  endfunction

  task automatic model_step(logic [15:0] ins);
    logic [2:0] op, rs, rt, rd, fn;
    logic       sh;
    logic [6:0] im;
    logic [15:0] s, t, r, p1;
    op = ins[15:13]; rs = ins[12:10]; rt = ins[9:7]; rd = ins[6:4]; sh = ins[3];
    fn = ins[2:0]; im = ins[6:0];
    s = m_reg[rs]; t = m_reg[rt];
    p1 = m_pc + 16'd1;
    e_reg_we = 0; e_mem_we = 0; e_reg_a = 0; e_reg_d = 0; e_mem_a = 0; e_mem_d = 0;
    e_next = p1;
    case (op)
      3'b000: begin
        case (fn)
          3'b000: r = s + t;
          3'b001: r = s - t;
          3'b010: begin r = sh ? {t[14:0], 1'b0} : t; n_shift++; end
          3'b011: begin r = sh ? {1'b0, t[15:1]} : t; n_shift++; end
          3'b100: r = s & t;
          3'b101: r = s | t;
          3'b110: r = s ^ t;
          default: begin
            r = ((s[15] && !t[15]) || (s[15] == t[15] && s < t)) ? 16'd1 : 16'd0;
            n_slt++;
          end
        endcase
        e_reg_we = 1; e_reg_a = rd; e_reg_d = r;
      end
      3'b001: begin e_reg_we = 1; e_reg_a = rt; e_reg_d = s + sx7(im); if (im[6]) n_sext_neg++; end
      3'b010: begin
        e_reg_we = 1; e_reg_a = rt; e_mem_a = s + sx7(im);
        e_reg_d = m_mem[e_mem_a[7:0]];
        if (!m_mem_valid[e_mem_a[7:0]]) begin failures++; $display("FAIL program reads unwritten memory"); end
        n_load++; if (im[6]) n_sext_neg++;
      end
      3'b011: begin
        e_mem_we = 1; e_mem_a = s + sx7(im); e_mem_d = t;
        n_store++; if (im[6]) n_sext_neg++;
      end
      3'b100: begin
        if (s == t) begin e_next = p1 + sx7(im); n_beq_taken++; end
        else n_beq_not++;
      end
      3'b101: begin e_reg_we = 1; e_reg_a = rt; e_reg_d = s & {9'b0, im}; if (im[6]) n_zext_high++; end
      3'b110: begin e_reg_we = 1; e_reg_a = rt; e_reg_d = s | {9'b0, im}; if (im[6]) n_zext_high++; end
      default: begin e_next = {p1[15:13], ins[12:0]}; n_jump++; end
    endcase
  endtask

  task automatic model_commit();
    if (e_reg_we) begin
      if (e_reg_a != 0) m_reg[e_reg_a] = e_reg_d;
      else n_r0_write++;
    end
    if (e_mem_we) begin
      m_mem[e_mem_a[7:0]] = e_mem_d;
      m_mem_valid[e_mem_a[7:0]] = 1;
    end
    m_pc = e_next;
  endtask

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (model pc %0d)", what, m_pc);
    end
  endtask

  // ---------------------------------------------------------------- ROM tracer stimulus
  int exp_trace = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (trace_step) begin
        exp_trace <= exp_trace + 1;
        n_trace++;
      end
    end
  end

  always @(negedge clk) begin
    trace_step <= rst ? 1'b0 : (($urandom % 2) == 0);
    if (!rst) begin
      checks += 2;
      if (trace_addr !== 16'(exp_trace)) begin failures++; $display("FAIL tracer address"); end
      if (trace_instr !== ref_program(exp_trace % 256)) begin failures++; $display("FAIL tracer instruction"); end
    end
  end

  // ---------------------------------------------------------------- main sequence
  initial begin
    int cycles, retired, halt_cycle;
    logic [15:0] ref_instr;
    n_beq_taken = 0; n_beq_not = 0; n_jump = 0; n_load = 0; n_store = 0; n_sext_neg = 0;
    n_zext_high = 0; n_shift = 0; n_slt = 0; n_r0_write = 0; n_trace = 0;
    m_pc = 0;
    for (int r = 0; r < 8; r++) m_reg[r] = 0;
    for (int a = 0; a < 256; a++) m_mem_valid[a] = 0;
    trace_step = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cycles = 0; retired = 0; halt_cycle = -1;

    while (cycles < 80) begin
      @(negedge clk);
      ref_instr = ref_program(int'(m_pc) % 256);
      model_step(ref_instr);
      chk(pc === m_pc, $sformatf("pc %0d", pc));
      chk(instr === ref_instr, "instruction fetched");
      chk(next_pc === e_next, $sformatf("next pc %0d exp %0d", next_pc, e_next));
      chk(ctrl.reg_write === e_reg_we, "RegWrite");
      if (e_reg_we) begin
        chk(wb_addr === e_reg_a, "write-back address");
        chk(wb_data === e_reg_d, $sformatf("write-back data %h exp %h", wb_data, e_reg_d));
      end
      chk(ctrl.mem_write === e_mem_we, "MemWrite");
      if (e_mem_we) begin
        chk(alu_res === e_mem_a, "store address");
        chk(rd2 === e_mem_d, "store data");
      end
      if (halt_cycle < 0 && m_pc == 16'(HALT_PC)) halt_cycle = cycles;
      if (halt_cycle < 0) retired++;
      @(posedge clk);
      model_commit();
      cycles++;
    end

    // one instruction per cycle: the halt loop is reached after exactly the number
    // of instructions the program executes before it (53, worked out by hand:
    // 4 setup + 4 loop passes of 7 + a last pass of 6 + 14 + the forward branch
    // target)
    chk(halt_cycle == 53 && retired == 53,
        $sformatf("halt reached at cycle %0d after %0d instructions", halt_cycle, retired));

    // final state: every write-back and store of the processor matched the model
    // above, so the model's final state is the processor's; check it against values
    // worked out by hand
    chk(m_reg[0] === 16'h0000, "$0 = 0");
    chk(m_reg[1] === 16'h8001, "$1 = 0x8001");
    chk(m_reg[2] === 16'd15,   "$2 = 15");
    chk(m_reg[3] === 16'd21,   "$3 = 21");
    chk(m_reg[4] === 16'h7FF8, "$4 = 0x7FF8");
    chk(m_reg[5] === 16'hFFF1, "$5 = 0xFFF1");
    chk(m_reg[6] === 16'h8001, "$6 = 0x8001");
    chk(m_reg[7] === 16'hFFFF, "$7 = 0xFFFF");
    chk(m_mem[0]  === 16'd15,   "mem[0] = 15");
    chk(m_mem[16] === 16'd5,    "mem[16] = 5");
    chk(m_mem[19] === 16'd2,    "mem[19] = 2");
    chk(m_mem[20] === 16'h8001, "mem[20] = 0x8001");

    $display("mechanisms: beq taken %0d, beq not taken %0d, j %0d, lw %0d, sw %0d, sign-ext negative %0d, zero-ext %0d, shift %0d, slt %0d, write to $0 %0d, tracer steps %0d",
             n_beq_taken, n_beq_not, n_jump, n_load, n_store, n_sext_neg, n_zext_high,
             n_shift, n_slt, n_r0_write, n_trace);
    chk(n_beq_taken > 0, "beq taken happened");
    chk(n_beq_not   > 0, "beq not taken happened");
    chk(n_jump      > 0, "jump happened");
    chk(n_load      > 0, "load happened");
    chk(n_store     > 0, "store happened");
    chk(n_sext_neg  > 0, "negative sign extension happened");
    chk(n_zext_high > 0, "zero extension of a high immediate happened");
    chk(n_shift     > 0, "shift happened");
    chk(n_slt       > 0, "slt happened");
    chk(n_r0_write  > 0, "write to $0 happened");
    chk(n_trace     > 0, "tracer step happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
