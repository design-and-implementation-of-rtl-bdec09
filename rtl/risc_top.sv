// risc_top: 16-bit single-cycle, non-pipelined, load/store RISC processor with
// its 64-word common program/data memory.
//
// Every instruction completes in one clock cycle. In that cycle the program
// counter addresses the memory's instruction port, the decoder (IDU) splits
// the word, the register file delivers the destination and source registers,
// the ALU computes, and at the rising edge that ends the cycle the result (or
// a LOAD's memory word) is written to the destination register, the flags
// update, a STORE writes memory and the PC steps or jumps. The clock control
// unit (CCU) enables the blocks: register write-back happens when its timing
// strobe WE_t and the decoder's WB_en are both high. A program of N
// instructions ending in HALT therefore takes N cycles.
//
// Host side: while the processor is not running (after reset or after HALT)
// the memory's data port belongs to the host (`host_*`), which loads the
// program from address 0 and its data above the HALT, and reads results back.
// A `start` pulse runs the program from address 0; `halted` rises after HALT.
// `dbg_reg_addr`/`dbg_reg_data` read any register at any time.
// The blocks and their connections follow the design's block diagram; the
// host port, the start/halted handshake and the register inspection port are
// this design's own, since the design does not say how programs are loaded.
module risc_top
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  // host access to the memory while the processor is not running
  input  logic   host_we,
  input  maddr_t host_addr,
  input  word_t  host_wdata,
  output word_t  host_rdata,
  // register inspection
  input  raddr_t dbg_reg_addr,
  output word_t  dbg_reg_data,
  // status
  output logic   running,
  output logic   halted,
  output word_t  cycles,
  output maddr_t pc,
  output maddr_t link,
  output logic   zero_flag,
  output logic   sign_flag
);
  decoded_t dec;
  word_t    instruction, idata, ddata, mem_wdata;
  word_t    rs_data, rd_data, alu_b, alu_result, reg_wdata;
  maddr_t   daddr;
  logic     mem_we, reg_we;
  logic     pc_en, pc_clear, idu_en, alu_en, we_t, taken;

  // ---------------- clock control unit ----------------
  ccu u_ccu (
    .clk, .rst_n, .start,
    .halt    (dec.halt),
    .alu_inst(dec.alu_inst),
    .pc_en, .pc_clear, .idu_en, .alu_en, .we_t,
    .running, .halted, .cycles
  );

  // ---------------- program counter ----------------
  program_counter u_pc (
    .clk, .rst_n, .pc_en, .pc_clear,
    .jcond    (dec.jcond),
    .jtarget  (dec.jtarget),
    .zero_flag, .sign_flag,
    .ls_en    (dec.load | dec.store),
    .ls_addr  (dec.maddr),
    .data_in  (idata),
    .pc, .instruction, .link, .taken
  );

  // ---------------- instruction decoder ----------------
  idu u_idu (.idu_en, .instr(instruction), .dec);

  // ---------------- register file ----------------
  assign reg_we    = we_t & dec.wb_en;
  assign reg_wdata = dec.load ? ddata : alu_result;

  register_file u_reg (
    .clk, .rst_n,
    .rs_addr (dec.rs),  .rs_data,
    .rd_addr (dec.rd),  .rd_data,
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data),
    .we      (reg_we),
    .waddr   (dec.rd),
    .wdata   (reg_wdata)
  );

  // ---------------- ALU ----------------
  assign alu_b = dec.use_imm ? word_t'(dec.imm) : rs_data;

  alu u_alu (
    .clk, .rst_n, .alu_en,
    .op(dec.alu_op), .a(rd_data), .b(alu_b),
    .result(alu_result), .zero_flag, .sign_flag
  );

  // ---------------- common memory ----------------
  always_comb begin
    if (running) begin
      daddr     = dec.maddr;
      mem_we    = we_t & dec.store;
      mem_wdata = rs_data;
    end else begin
      daddr     = host_addr;
      mem_we    = host_we;
      mem_wdata = host_wdata;
    end
  end
  assign host_rdata = ddata;

  unified_memory u_mem (
    .clk,
    .iaddr(pc), .idata,
    .daddr, .ddata,
    .we(mem_we), .wdata(mem_wdata)
  );

  // The host must leave the memory alone while a program runs.
  a_no_host_write_while_running: assert property (
    @(posedge clk) disable iff (!rst_n) !(running && host_we))
    else $error("host write while the processor is running");
  // A jump is only taken while the program counter is enabled to move.
  a_jump_only_when_running: assert property (
    @(posedge clk) disable iff (!rst_n) (taken && dec.jcond != JC_NONE) |-> idu_en)
    else $error("jump decoded while the decoder is disabled");

  logic unused_pc_taken;
  assign unused_pc_taken = taken;
endmodule
