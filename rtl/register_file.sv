// register_file: eight 16-bit general purpose registers, R0..R7, each
// addressed by a 3-bit identifier.
//
// Two combinational read ports deliver the source register (`rs`) and the
// destination register (`rd`, the ALU's first operand); a third read port
// (`dbg_addr`) lets the surroundings inspect any register. One write port
// stores `wdata` into `waddr` at the rising clock edge when `we` is high.
// All registers clear on reset. The register count, width and 3-bit
// addresses are the design's; the reset and the inspection port are this
// design's additions.
module register_file
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  raddr_t rs_addr,
  output word_t  rs_data,
  input  raddr_t rd_addr,
  output word_t  rd_data,
  input  raddr_t dbg_addr,
  output word_t  dbg_data,
  input  logic   we,
  input  raddr_t waddr,
  input  word_t  wdata
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rs_data  = regs[rs_addr];
  assign rd_data  = regs[rd_addr];
  assign dbg_data = regs[dbg_addr];
endmodule
