// risc_pkg: shared widths, the opcode map and the decoded-instruction type of
// the 16-bit single-cycle RISC processor.
//
// Fixed by the design: 16-bit instructions and registers, a 5-bit opcode in
// bits [15:11], eight registers with 3-bit addresses, a 64-word common memory
// addressed by 6-bit pointers, and the 27 instructions MOV, AND, OR, XOR, ADD,
// SUB, SL, RL, SR, RR, SWAP, MUL, LHI, LLI, ANDI, ORI, XORI, ADDI, SUBI, LOAD,
// STORE, JMP, JZ, JNZ, JP, JN and HALT.
// Own choice: the numeric value of each opcode (the order of the list above,
// MOV = 0). Codes 27..31 are reserved and execute as no-operations.
package risc_pkg;

  localparam int unsigned XLEN      = 16;  // data, register and instruction width
  localparam int unsigned OPW       = 5;   // opcode width
  localparam int unsigned RAW       = 3;   // register address width
  localparam int unsigned NREGS     = 8;   // general purpose registers
  localparam int unsigned MAW       = 6;   // memory pointer width
  localparam int unsigned MEM_WORDS = 64;  // common instruction/data memory

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  raddr_t;
  typedef logic [MAW-1:0]  maddr_t;

  typedef enum logic [OPW-1:0] {
    OP_MOV   = 5'd0,
    OP_AND   = 5'd1,
    OP_OR    = 5'd2,
    OP_XOR   = 5'd3,
    OP_ADD   = 5'd4,
    OP_SUB   = 5'd5,
    OP_SL    = 5'd6,
    OP_RL    = 5'd7,
    OP_SR    = 5'd8,
    OP_RR    = 5'd9,
    OP_SWAP  = 5'd10,
    OP_MUL   = 5'd11,
    OP_LHI   = 5'd12,
    OP_LLI   = 5'd13,
    OP_ANDI  = 5'd14,
    OP_ORI   = 5'd15,
    OP_XORI  = 5'd16,
    OP_ADDI  = 5'd17,
    OP_SUBI  = 5'd18,
    OP_LOAD  = 5'd19,
    OP_STORE = 5'd20,
    OP_JMP   = 5'd21,
    OP_JZ    = 5'd22,
    OP_JNZ   = 5'd23,
    OP_JP    = 5'd24,
    OP_JN    = 5'd25,
    OP_HALT  = 5'd26
  } opcode_e;

  // Operation selected inside the ALU.
  typedef enum logic [3:0] {
    ALU_PASS_B = 4'd0,   // result = operand B (MOV)
    ALU_AND    = 4'd1,
    ALU_OR     = 4'd2,
    ALU_XOR    = 4'd3,
    ALU_ADD    = 4'd4,
    ALU_SUB    = 4'd5,
    ALU_SL     = 4'd6,   // shift B left one place
    ALU_RL     = 4'd7,   // rotate B left one place
    ALU_SR     = 4'd8,   // arithmetic shift B right one place (divide by 2)
    ALU_RR     = 4'd9,   // rotate B right one place
    ALU_SWAP   = 4'd10,  // exchange the bytes of B
    ALU_MUL    = 4'd11,  // low 16 bits of A * B
    ALU_LHI    = 4'd12,  // {B[7:0], A[7:0]}
    ALU_LLI    = 4'd13   // {A[15:8], B[7:0]}
  } alu_op_e;

  // Jump condition evaluated by the program counter.
  typedef enum logic [2:0] {
    JC_NONE   = 3'd0,  // no jump
    JC_ALWAYS = 3'd1,  // JMP
    JC_Z      = 3'd2,  // JZ : Zero flag set
    JC_NZ     = 3'd3,  // JNZ: Zero flag clear
    JC_P      = 3'd4,  // JP : Sign and Zero flags clear
    JC_N      = 3'd5   // JN : Sign flag set
  } jcond_e;

  // Everything the decoder derives from one instruction.
  typedef struct packed {
    opcode_e op;
    raddr_t  rd;        // destination register (formats a, b, c)
    raddr_t  rs;        // source register (formats a, d)
    logic    use_imm;   // operand B is the zero-extended 8-bit immediate
    logic [7:0] imm;
    alu_op_e alu_op;
    logic    alu_inst;  // the ALU produces the write-back value and flags
    logic    wb_en;     // the destination register is written
    logic    load;
    logic    store;
    maddr_t  maddr;     // data memory pointer of LOAD/STORE
    jcond_e  jcond;
    maddr_t  jtarget;   // jump destination
    logic    halt;
  } decoded_t;

endpackage
