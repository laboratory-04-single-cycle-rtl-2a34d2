// ext_unit: the extension unit of the MIPS 16 processor.
//
// Widens the 7-bit I-type immediate to 16 bits. With ExtOp = 1 the sign bit imm[6]
// is replicated into the upper nine bits (addi, lw, sw, beq); with ExtOp = 0 the
// upper bits are zero (the logical immediates andi and ori), as the lab text and
// the MIPS convention for logical immediates prescribe.
//
// Purely combinational.
module ext_unit
  import mips16_pkg::*;
(
  input  logic [IMMW-1:0] imm,
  input  logic            ext_op,  // 1: sign extension, 0: zero extension
  output word_t           ext_imm
);

  always_comb begin
    ext_imm = {{(XLEN-IMMW){ext_op & imm[IMMW-1]}}, imm};
  end

endmodule
