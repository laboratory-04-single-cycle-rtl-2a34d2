// instr_rom: the instruction memory of the MIPS 16 processor.
//
// A read-only memory with one input bus (the instruction address), one output bus
// (the 16-bit instruction) and no control signals, as the lab description specifies.
// The read is combinational. The word is selected by the low log2(DEPTH) address
// bits; words past the end of the program read as 0, which is add $0,$0,$0, a no-op.
//
// The ROM holds the test program below. It exercises all fifteen instructions:
// a loop stores the numbers 5..1 to memory, loads each back and sums them (sum 15),
// using sw, lw, add, addi with a negative immediate, beq taken and not taken and a
// backward j; then it exercises sub, sll, srl, and, or, xor, slt, ori and andi
// (zero-extended immediates), a write to $0 (ignored), a store and load with a
// negative offset and a forward branch, and ends in a jump to itself.
//
//   addr  assembly                 effect
//    0    addi $1, $0, 5           $1 = 5            (loop counter n)
//    1    addi $2, $0, 0           $2 = 0            (sum)
//    2    addi $3, $0, 16          $3 = 16           (memory pointer)
//    3    addi $7, $0, -1          $7 = 0xFFFF       (sign extension)
//    4    sw   $1, 0($3)           mem[$3] = n       <- loop
//    5    lw   $4, 0($3)           $4 = mem[$3]
//    6    add  $2, $2, $4          sum += $4
//    7    addi $3, $3, 1           pointer++
//    8    addi $1, $1, -1          n--
//    9    beq  $1, $0, 1           if n == 0 goto 11
//   10    j    4
//   11    sub  $5, $0, $2          $5 = -15 = 0xFFF1
//   12    sll  $6, $2, 1           $6 = 30
//   13    srl  $4, $5, 1           $4 = 0x7FF8
//   14    and  $4, $4, $7          $4 = 0x7FF8
//   15    or   $1, $6, $4          $1 = 0x7FFE
//   16    xor  $1, $1, $7          $1 = 0x8001
//   17    slt  $6, $5, $2          $6 = 1  (-15 < 15)
//   18    slt  $6, $2, $5          $6 = 0
//   19    ori  $6, $0, 0x7F        $6 = 0x007F       (zero extension)
//   20    andi $6, $7, 0x55        $6 = 0x0055
//   21    addi $0, $0, 3           no effect ($0 stays 0)
//   22    sw   $1, -1($3)          mem[20] = 0x8001
//   23    lw   $6, -1($3)          $6 = 0x8001
//   24    beq  $6, $1, 1           taken: goto 26
//   25    addi $7, $0, 0           skipped
//   26    sw   $2, 0($0)           mem[0] = 15
//   27    j    27                  halt
//
// DEPTH (256 words) is this design's choice; the lab only says the memory is
// smaller than the 32-bit version's.
module instr_rom
  import mips16_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  word_t addr,   // instruction address (word address)
  output word_t instr   // instruction at that address
);

  localparam int unsigned AW = $clog2(DEPTH);

  function automatic word_t program_word(logic [AW-1:0] a);
    case (int'(a))
      0:  return enc_i(OP_ADDI, 1, 0, 5);
      1:  return enc_i(OP_ADDI, 2, 0, 0);
      2:  return enc_i(OP_ADDI, 3, 0, 16);
      3:  return enc_i(OP_ADDI, 7, 0, -1);
      4:  return enc_i(OP_SW,   1, 3, 0);
      5:  return enc_i(OP_LW,   4, 3, 0);
      6:  return enc_r(FN_ADD,  2, 2, 4, 0);
      7:  return enc_i(OP_ADDI, 3, 3, 1);
      8:  return enc_i(OP_ADDI, 1, 1, -1);
      9:  return enc_i(OP_BEQ,  0, 1, 1);
      10: return enc_j(4);
      11: return enc_r(FN_SUB,  5, 0, 2, 0);
      12: return enc_r(FN_SLL,  6, 0, 2, 1);
      13: return enc_r(FN_SRL,  4, 0, 5, 1);
      14: return enc_r(FN_AND,  4, 4, 7, 0);
      15: return enc_r(FN_OR,   1, 6, 4, 0);
      16: return enc_r(FN_XOR,  1, 1, 7, 0);
      17: return enc_r(FN_SLT,  6, 5, 2, 0);
      18: return enc_r(FN_SLT,  6, 2, 5, 0);
      19: return enc_i(OP_ORI,  6, 0, 'h7F);
      20: return enc_i(OP_ANDI, 6, 7, 'h55);
      21: return enc_i(OP_ADDI, 0, 0, 3);
      22: return enc_i(OP_SW,   1, 3, -1);
      23: return enc_i(OP_LW,   6, 3, -1);
      24: return enc_i(OP_BEQ,  1, 6, 1);
      25: return enc_i(OP_ADDI, 7, 0, 0);
      26: return enc_i(OP_SW,   2, 0, 0);
      27: return enc_j(27);
      default: return '0;
    endcase
  endfunction

  always_comb instr = program_word(addr[AW-1:0]);

endmodule
