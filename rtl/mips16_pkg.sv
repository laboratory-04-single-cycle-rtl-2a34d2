// mips16_pkg: types and constants shared by the MIPS 16 single-cycle processor.
//
// The processor has 16-bit instructions and data, eight 16-bit registers and three
// instruction formats, each with a 3-bit opcode:
//   R-type  opcode[15:13] rs[12:10] rt[9:7] rd[6:4] sa[3] funct[2:0]
//   I-type  opcode[15:13] rs[12:10] rt[9:7] imm[6:0]
//   J-type  opcode[15:13] target[12:0]
// The field widths and the instruction list (add, sub, sll, srl, and, or, addi, lw,
// sw, beq, j, plus two R-type and two I-type instructions of the designer's choice)
// follow the lab description. The numeric opcode and function codes, the two extra
// R-type instructions (xor, slt), the two extra I-type instructions (andi, ori) and
// the ALUOp/ALUCtrl encodings are this design's own choices.
//
// Addressing is by 16-bit word: the PC advances by 1 per instruction, a taken beq
// goes to PC+1+sext(imm), and j goes to {PC+1[15:13], target}.
package mips16_pkg;

  localparam int unsigned XLEN   = 16;  // instruction and data width
  localparam int unsigned NREGS  = 8;   // register file size
  localparam int unsigned RADDR  = 3;   // register address width
  localparam int unsigned IMMW   = 7;   // I-type immediate width
  localparam int unsigned TGTW   = 13;  // J-type target width

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [RADDR-1:0] reg_addr_t;

  // Opcodes (3 bits). R-type uses opcode 0 and selects the operation by funct.
  typedef enum logic [2:0] {
    OP_RTYPE = 3'b000,
    OP_ADDI  = 3'b001,
    OP_LW    = 3'b010,
    OP_SW    = 3'b011,
    OP_BEQ   = 3'b100,
    OP_ANDI  = 3'b101,
    OP_ORI   = 3'b110,
    OP_J     = 3'b111
  } opcode_t;

  // R-type function codes (3 bits).
  typedef enum logic [2:0] {
    FN_ADD = 3'b000,
    FN_SUB = 3'b001,
    FN_SLL = 3'b010,
    FN_SRL = 3'b011,
    FN_AND = 3'b100,
    FN_OR  = 3'b101,
    FN_XOR = 3'b110,
    FN_SLT = 3'b111
  } funct_t;

  // ALUOp: what the main control asks of the ALU control.
  typedef enum logic [2:0] {
    ALUOP_RTYPE = 3'b000,  // operation given by the funct field
    ALUOP_ADD   = 3'b001,  // addi, lw, sw: address / sum
    ALUOP_SUB   = 3'b010,  // beq: compare by subtraction
    ALUOP_AND   = 3'b011,  // andi
    ALUOP_OR    = 3'b100   // ori
  } alu_op_t;

  // ALUCtrl: the operation the ALU performs (3 bits for 8 operations).
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_SLL = 3'b010,
    ALU_SRL = 3'b011,
    ALU_AND = 3'b100,
    ALU_OR  = 3'b101,
    ALU_XOR = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_t;

  // Control signals produced by the main control unit for one instruction.
  typedef struct packed {
    logic    reg_dst;    // 1: write rd (R-type), 0: write rt (I-type)
    logic    ext_op;     // 1: sign-extend immediate, 0: zero-extend
    logic    alu_src;    // 1: ALU operand B is the extended immediate, 0: rt
    logic    branch;     // beq
    logic    jump;       // j
    alu_op_t alu_op;     // to the ALU control
    logic    mem_write;  // store to data memory
    logic    mem_to_reg; // 1: write-back data from memory, 0: from ALU
    logic    reg_write;  // write the register file
  } ctrl_t;

  // Instruction encoders, used to build the program held in the instruction ROM.
  function automatic word_t enc_r(funct_t fn, int unsigned rd, int unsigned rs,
                                  int unsigned rt, int unsigned sa);
    word_t w;
    w = {OP_RTYPE, rs[2:0], rt[2:0], rd[2:0], sa[0], fn};
    return w;
  endfunction

  function automatic word_t enc_i(opcode_t op, int unsigned rt, int unsigned rs, int imm);
    word_t w;
    w = {op, rs[2:0], rt[2:0], imm[6:0]};
    return w;
  endfunction

  function automatic word_t enc_j(int unsigned target);
    word_t w;
    w = {OP_J, target[12:0]};
    return w;
  endfunction

endpackage
