// mips16_top: the single-cycle MIPS 16 processor, with a ROM tracer beside it.
//
// Every instruction completes in one clock cycle. In that cycle the PC addresses the
// instruction ROM; the main control decodes the opcode; the register file reads rs
// and rt; the extension unit widens the 7-bit immediate (sign or zero, by ExtOp);
// the ALU computes on rs and either rt or the immediate (ALUSrc), under the ALU
// control's ALUCtrl; the data RAM is read at, or written at, the ALU result; and the
// write-back value (ALU result, or memory data for lw, by MemtoReg) goes to rt or rd
// (RegDst). At the rising clock edge the PC, the register written and the memory
// word written are all updated together.
//
// Next-PC logic: PC+1 normally; PC+1+sext(imm) for beq when the ALU's Zero flag is
// set (PCSrc = Branch & Zero); {PC+1[15:13], target} for j. The word-addressed
// PC (step 1, no <<2) and the jump-target formation are this design's reading of the
// MIPS32 rules for 16-bit words.
//
// The processor's internal values (PC, instruction, register reads, extended
// immediate, ALU result, memory data, write-back data and address, control signals)
// are brought out as debug ports, for the board display that would show them.
//
// Beside the processor, and independent of it, a rom_tracer steps a second copy of
// the instruction ROM by one address per trace_step pulse (the pulse would come from
// a push-button pulse generator), to check the program held in the ROM.
//
// Reset is synchronous and active high: PC and registers go to 0. The data RAM is
// not reset.
module mips16_top
  import mips16_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,  // instruction ROM words
  parameter int unsigned DMEM_DEPTH = 256   // data RAM words
) (
  input  logic      clk,
  input  logic      rst,
  // processor debug view
  output word_t     pc,          // address of the current instruction
  output word_t     instr,       // current instruction
  output word_t     next_pc,     // address of the next instruction
  output word_t     rd1,         // register file read data 1 (rs)
  output word_t     rd2,         // register file read data 2 (rt)
  output word_t     ext_imm,     // extended immediate
  output word_t     alu_res,     // ALU result (also the data memory address)
  output word_t     mem_rd,      // data memory read data
  output word_t     wb_data,     // register write-back data
  output reg_addr_t wb_addr,     // register write-back address
  output ctrl_t     ctrl,        // control signals of the current instruction
  // ROM tracer
  input  logic      trace_step,  // one-cycle pulse: advance the traced address
  output word_t     trace_addr,
  output word_t     trace_instr
);

  // Instruction fields
  opcode_t   opcode;
  reg_addr_t rs, rt, rd;
  logic      sa;
  funct_t    funct;
  logic [IMMW-1:0] imm;
  logic [TGTW-1:0] target;

  alu_ctrl_t alu_ctrl;
  word_t     alu_b;
  logic      zero;
  word_t     pc_plus1, branch_target, jump_target;
  logic      pc_src;

  // ---------------------------------------------------------------- fetch
  program_counter u_pc (
    .clk    (clk),
    .rst    (rst),
    .next_pc(next_pc),
    .pc     (pc)
  );

  instr_rom #(.DEPTH(IMEM_DEPTH)) u_imem (
    .addr (pc),
    .instr(instr)
  );

  always_comb begin
    opcode = opcode_t'(instr[15:13]);
    rs     = instr[12:10];
    rt     = instr[9:7];
    rd     = instr[6:4];
    sa     = instr[3];
    funct  = funct_t'(instr[2:0]);
    imm    = instr[IMMW-1:0];
    target = instr[TGTW-1:0];
  end

  // ---------------------------------------------------------------- decode
  main_control u_ctrl (
    .opcode(opcode),
    .ctrl  (ctrl)
  );

  assign wb_addr = ctrl.reg_dst ? rd : rt;

  reg_file u_rf (
    .clk      (clk),
    .rst      (rst),
    .ra1      (rs),
    .ra2      (rt),
    .wa       (wb_addr),
    .wd       (wb_data),
    .reg_write(ctrl.reg_write),
    .rd1      (rd1),
    .rd2      (rd2)
  );

  ext_unit u_ext (
    .imm    (imm),
    .ext_op (ctrl.ext_op),
    .ext_imm(ext_imm)
  );

  // ---------------------------------------------------------------- execute
  alu_control u_aluctrl (
    .alu_op  (ctrl.alu_op),
    .funct   (funct),
    .alu_ctrl(alu_ctrl)
  );

  assign alu_b = ctrl.alu_src ? ext_imm : rd2;

  alu u_alu (
    .a       (rd1),
    .b       (alu_b),
    .sa      (sa),
    .alu_ctrl(alu_ctrl),
    .result  (alu_res),
    .zero    (zero)
  );

  // ---------------------------------------------------------------- memory
  data_ram #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk      (clk),
    .addr     (alu_res),
    .wd       (rd2),
    .mem_write(ctrl.mem_write),
    .rd       (mem_rd)
  );

  // ---------------------------------------------------------------- write back
  assign wb_data = ctrl.mem_to_reg ? mem_rd : alu_res;

  // ---------------------------------------------------------------- next PC
  always_comb begin
    pc_plus1      = pc + word_t'(1);
    branch_target = pc_plus1 + ext_imm;
    jump_target   = {pc_plus1[XLEN-1:TGTW], target};
    pc_src        = ctrl.branch & zero;
    if (ctrl.jump)   next_pc = jump_target;
    else if (pc_src) next_pc = branch_target;
    else             next_pc = pc_plus1;
  end

  // ---------------------------------------------------------------- ROM tracer
  rom_tracer #(.DEPTH(IMEM_DEPTH)) u_tracer (
    .clk  (clk),
    .rst  (rst),
    .step (trace_step),
    .addr (trace_addr),
    .instr(trace_instr)
  );

endmodule
