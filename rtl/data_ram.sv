// data_ram: the data memory of the MIPS 16 processor.
//
// A memory of 16-bit words with a 16-bit address, a 16-bit write-data bus, a 16-bit
// read-data bus and a single control signal, MemWrite, as the lab description
// specifies. The word is selected by the low log2(DEPTH) address bits; the upper
// address bits are ignored, so the memory repeats through the 64K address space.
//
// This design's own choices: DEPTH (256 words), word addressing, an asynchronous
// (combinational) read so that lw completes within its single cycle, and a write on
// the rising clock edge when mem_write is high. The contents are not reset.
module data_ram
  import mips16_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  input  word_t addr,       // word address
  input  word_t wd,         // write data
  input  logic  mem_write,  // write enable
  output word_t rd          // read data
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (mem_write) mem[addr[AW-1:0]] <= wd;
  end

  assign rd = mem[addr[AW-1:0]];

endmodule
