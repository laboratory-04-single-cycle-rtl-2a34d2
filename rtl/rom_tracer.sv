// rom_tracer: steps through the instruction ROM by hand.
//
// A 16-bit address counter, advanced by one on each clock cycle in which step is
// high, addresses an instruction ROM; the address and the instruction at it are
// output for display. On a board, step is the one-cycle pulse of a push-button
// pulse generator, so each press shows the next instruction of the program. This
// is the tracing arrangement the lab uses to check the program written into the
// ROM before the processor exists.
//
// This design's own choices: a synchronous active-high reset to address 0 and
// wrap-around at the end of the 16-bit address range.
//
// Timing: addr changes on the rising clock edge after a cycle with step high; instr
// follows addr combinationally.
module rom_tracer
  import mips16_pkg::*;
#(
  parameter int unsigned DEPTH = 256  // ROM depth in words
) (
  input  logic  clk,
  input  logic  rst,    // synchronous, active high: addr <= 0
  input  logic  step,   // one-cycle pulse: advance to the next address
  output word_t addr,   // current ROM address
  output word_t instr   // instruction at that address
);

  always_ff @(posedge clk) begin
    if (rst)       addr <= '0;
    else if (step) addr <= addr + word_t'(1);
  end

  instr_rom #(.DEPTH(DEPTH)) u_rom (
    .addr (addr),
    .instr(instr)
  );

endmodule
