// mips16_tb_pkg: reference data for the MIPS 16 testbenches.
//
// Holds the test program as hand-assembled 16-bit words, written field by field
// (opcode_rs_rt_rd_sa_funct for R-type, opcode_rs_rt_imm for I-type,
// opcode_target for J-type), independently of the encoder functions the ROM uses.
// Opcodes: addi 001, lw 010, sw 011, beq 100, andi 101, ori 110, j 111, R-type 000.
// Functions: add 000, sub 001, sll 010, srl 011, and 100, or 101, xor 110, slt 111.
package mips16_tb_pkg;

  localparam int PROG_LEN = 28;
  localparam int HALT_PC  = 27;

  function automatic logic [15:0] ref_program(int a);
    case (a)
      0:  return 16'b001_000_001_0000101;     // addi $1,$0,5
      1:  return 16'b001_000_010_0000000;     // addi $2,$0,0
      2:  return 16'b001_000_011_0010000;     // addi $3,$0,16
      3:  return 16'b001_000_111_1111111;     // addi $7,$0,-1
      4:  return 16'b011_011_001_0000000;     // sw   $1,0($3)
      5:  return 16'b010_011_100_0000000;     // lw   $4,0($3)
      6:  return 16'b000_010_100_010_0_000;   // add  $2,$2,$4
      7:  return 16'b001_011_011_0000001;     // addi $3,$3,1
      8:  return 16'b001_001_001_1111111;     // addi $1,$1,-1
      9:  return 16'b100_001_000_0000001;     // beq  $1,$0,1
      10: return 16'b111_0000000000100;       // j    4
      11: return 16'b000_000_010_101_0_001;   // sub  $5,$0,$2
      12: return 16'b000_000_010_110_1_010;   // sll  $6,$2,1
      13: return 16'b000_000_101_100_1_011;   // srl  $4,$5,1
      14: return 16'b000_100_111_100_0_100;   // and  $4,$4,$7
      15: return 16'b000_110_100_001_0_101;   // or   $1,$6,$4
      16: return 16'b000_001_111_001_0_110;   // xor  $1,$1,$7
      17: return 16'b000_101_010_110_0_111;   // slt  $6,$5,$2
      18: return 16'b000_010_101_110_0_111;   // slt  $6,$2,$5
      19: return 16'b110_000_110_1111111;     // ori  $6,$0,0x7F
      20: return 16'b101_111_110_1010101;     // andi $6,$7,0x55
      21: return 16'b001_000_000_0000011;     // addi $0,$0,3
      22: return 16'b011_011_001_1111111;     // sw   $1,-1($3)
      23: return 16'b010_011_110_1111111;     // lw   $6,-1($3)
      24: return 16'b100_110_001_0000001;     // beq  $6,$1,1
      25: return 16'b001_000_111_0000000;     // addi $7,$0,0
      26: return 16'b011_000_010_0000000;     // sw   $2,0($0)
      27: return 16'b111_0000000011011;       // j    27
      default: return 16'h0000;
    endcase
  endfunction

endpackage
