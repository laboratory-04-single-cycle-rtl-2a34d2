// reg_file: the register file of the MIPS 16 processor.
//
// Eight 16-bit registers addressed by 3-bit fields. Two read ports are purely
// combinational (asynchronous), so the register file behaves as combinational logic
// when read; the single write port writes wd into register wa on the rising clock
// edge when reg_write is high. This follows the lab description.
//
// This design's own choices: register 0 always reads as zero and ignores writes, as
// in MIPS32 (so an instruction with $0 as destination has no effect), and a
// synchronous active-high reset clears all registers so that a program starts from
// a known state.
//
// Timing: a value written at a clock edge is visible on the read ports right after
// that edge; a read in the same cycle as a write to the same register returns the
// old value.
module reg_file
  import mips16_pkg::*;
#(
  parameter int unsigned N  = NREGS,  // number of registers
  parameter int unsigned AW = RADDR   // address width
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high: clear all registers
  input  logic [AW-1:0] ra1,        // read address 1 (rs)
  input  logic [AW-1:0] ra2,        // read address 2 (rt)
  input  logic [AW-1:0] wa,         // write address (rt or rd)
  input  word_t         wd,         // write data
  input  logic          reg_write,  // write enable
  output word_t         rd1,        // read data 1
  output word_t         rd2         // read data 2
);

  word_t regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (reg_write && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : regs[ra2];
  end

endmodule
