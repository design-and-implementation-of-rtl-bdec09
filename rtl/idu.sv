// idu: instruction decoder unit. Splits a 16-bit instruction into the fields
// of its format and derives the controls of the single cycle that runs it.
//
// Every instruction carries its 5-bit opcode in bits [15:11]. The formats are
// the design's:
//   (a) register ops   MOV AND OR XOR ADD SUB SL RL SR RR SWAP MUL
//                      rd = [10:8], rs = [7:5], [4:0] zero
//   (b) immediate ops  LHI LLI ANDI ORI XORI ADDI SUBI
//                      rd = [10:8], 8-bit immediate = [7:0]
//   (c) LOAD           rd = [10:8], 6-bit memory address = [7:2], [1:0] zero
//   (d) STORE          6-bit memory address = [10:5], rs = [4:2], [1:0] zero
//   (e) JMP JZ JNZ JP JN  6-bit target address = [10:5], [4:0] zero
//   (f) HALT           [10:0] zero
// Two-operand ops compute rd = rd op rs (or rd op imm); one-operand ops (MOV
// and the shifts) compute rd = op(rs). The decoder enables write-back for
// formats (a), (b) and (c), asks the program counter to record the address
// of a LOAD/STORE in the link register, and passes the jump condition and
// target. The immediate is zero-extended. Reserved opcodes 27..31 do nothing.
// When `idu_en` is low every control is inactive. Combinational.
// The opcode values, the zero extension and the use of rd as first operand
// are this design's choices.
module idu
  import risc_pkg::*;
(
  input  logic     idu_en,
  input  word_t    instr,
  output decoded_t dec
);
  logic [OPW-1:0] opc;
  assign opc = instr[15:11];

  always_comb begin
    dec          = '0;
    dec.op       = opcode_e'(opc);
    dec.rd       = instr[10:8];
    dec.rs       = instr[7:5];
    dec.imm      = instr[7:0];
    dec.maddr    = instr[7:2];
    dec.jtarget  = instr[10:5];
    dec.alu_op   = ALU_PASS_B;
    dec.jcond    = JC_NONE;

    if (idu_en) begin
      unique case (opc)
        OP_MOV:   begin dec.alu_op = ALU_PASS_B; dec.alu_inst = 1'b1; end
        OP_AND:   begin dec.alu_op = ALU_AND;    dec.alu_inst = 1'b1; end
        OP_OR:    begin dec.alu_op = ALU_OR;     dec.alu_inst = 1'b1; end
        OP_XOR:   begin dec.alu_op = ALU_XOR;    dec.alu_inst = 1'b1; end
        OP_ADD:   begin dec.alu_op = ALU_ADD;    dec.alu_inst = 1'b1; end
        OP_SUB:   begin dec.alu_op = ALU_SUB;    dec.alu_inst = 1'b1; end
        OP_SL:    begin dec.alu_op = ALU_SL;     dec.alu_inst = 1'b1; end
        OP_RL:    begin dec.alu_op = ALU_RL;     dec.alu_inst = 1'b1; end
        OP_SR:    begin dec.alu_op = ALU_SR;     dec.alu_inst = 1'b1; end
        OP_RR:    begin dec.alu_op = ALU_RR;     dec.alu_inst = 1'b1; end
        OP_SWAP:  begin dec.alu_op = ALU_SWAP;   dec.alu_inst = 1'b1; end
        OP_MUL:   begin dec.alu_op = ALU_MUL;    dec.alu_inst = 1'b1; end
        OP_LHI:   begin dec.alu_op = ALU_LHI;  dec.use_imm = 1'b1; dec.alu_inst = 1'b1; end
        OP_LLI:   begin dec.alu_op = ALU_LLI;  dec.use_imm = 1'b1; dec.alu_inst = 1'b1; end
        OP_ANDI:  begin dec.alu_op = ALU_AND;  dec.use_imm = 1'b1; dec.alu_inst = 1'b1; end
        OP_ORI:   begin dec.alu_op = ALU_OR;   dec.use_imm = 1'b1; dec.alu_inst = 1'b1; end
        OP_XORI:  begin dec.alu_op = ALU_XOR;  dec.use_imm = 1'b1; dec.alu_inst = 1'b1; end
        OP_ADDI:  begin dec.alu_op = ALU_ADD;  dec.use_imm = 1'b1; dec.alu_inst = 1'b1; end
        OP_SUBI:  begin dec.alu_op = ALU_SUB;  dec.use_imm = 1'b1; dec.alu_inst = 1'b1; end
        OP_LOAD:  begin dec.load  = 1'b1; end
        OP_STORE: begin dec.store = 1'b1; dec.rs = instr[4:2]; dec.maddr = instr[10:5]; end
        OP_JMP:   dec.jcond = JC_ALWAYS;
        OP_JZ:    dec.jcond = JC_Z;
        OP_JNZ:   dec.jcond = JC_NZ;
        OP_JP:    dec.jcond = JC_P;
        OP_JN:    dec.jcond = JC_N;
        OP_HALT:  dec.halt  = 1'b1;
        default:  ;  // reserved: no operation
      endcase
      dec.wb_en = dec.alu_inst | dec.load;
    end
  end
endmodule
