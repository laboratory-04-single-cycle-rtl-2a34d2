// program_counter: the 16-bit program counter of the MIPS 16 processor.
//
// An edge-triggered D register, as the lab description specifies: on every rising
// clock edge it loads next_pc, the address chosen by the next-PC logic (PC+1, the
// branch target or the jump target). A synchronous, active-high reset returns it to
// address 0, where the program starts; the reset is this design's addition, as the
// description gives none.
//
// Timing: pc changes only on the rising edge of clk; one instruction per cycle.
module program_counter
  import mips16_pkg::*;
(
  input  logic  clk,
  input  logic  rst,      // synchronous, active high: pc <= 0
  input  word_t next_pc,
  output word_t pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= next_pc;
  end

endmodule
