// unified_memory: the 64 x 16-bit memory that holds both the program and its
// data (one address space, von Neumann style).
//
// The program occupies the low addresses up to its HALT; data lies above it.
// The instruction port reads `iaddr` combinationally. The data port reads
// `daddr` combinationally and, when `we` is high, writes `wdata` to `daddr`
// at the rising clock edge; a read of the address being written returns the
// old word. Two read ports let an instruction and a LOAD's data be read in
// the same cycle, which the single-cycle execution needs; this is this
// design's choice. The contents are not reset; they are written through the
// data port before a program runs.
module unified_memory
  import risc_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] iaddr,
  output word_t         idata,
  input  logic [AW-1:0] daddr,
  output word_t         ddata,
  input  logic          we,
  input  word_t         wdata
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[daddr] <= wdata;
  end

  assign idata = mem[iaddr];
  assign ddata = mem[daddr];
endmodule
