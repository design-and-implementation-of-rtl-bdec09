// tb_asm_pkg: instruction encoders for the processor's six formats and an
// instruction-set reference model, shared by the processor testbenches.
//
// The model executes one instruction per call on its own copy of the
// registers, flags, memory, PC and link register, written directly from the
// instruction set definition and independent of the RTL.
package tb_asm_pkg;
  import risc_pkg::*;

  function automatic word_t f_reg(opcode_e op, int rd, int rs);   // format (a)
    return {op, 3'(rd), 3'(rs), 5'b0};
  endfunction
  function automatic word_t f_imm(opcode_e op, int rd, int imm);  // format (b)
    return {op, 3'(rd), 8'(imm)};
  endfunction
  function automatic word_t f_load(int rd, int addr);             // format (c)
    return {OP_LOAD, 3'(rd), 6'(addr), 2'b0};
  endfunction
  function automatic word_t f_store(int addr, int rs);            // format (d)
    return {OP_STORE, 6'(addr), 3'(rs), 2'b0};
  endfunction
  function automatic word_t f_jump(opcode_e op, int target);      // format (e)
    return {op, 6'(target), 5'b0};
  endfunction
  function automatic word_t f_halt();                             // format (f)
    return {OP_HALT, 11'b0};
  endfunction

  // Reference machine state.
  typedef struct {
    word_t  r   [8];
    word_t  mem [64];
    logic   z, s;
    maddr_t pc, link;
    logic   halted;
    int     steps;
  } iss_t;

  // Execute the instruction at m.pc. Returns 1 when a jump was taken.
  function automatic logic iss_step(ref iss_t m);
    word_t   ins, x, y, res;
    int      op, rd, rs;
    logic    alu, taken;
    ins   = m.mem[m.pc];
    op    = int'(ins[15:11]);
    rd    = int'(ins[10:8]);
    rs    = int'(ins[7:5]);
    x     = m.r[rd];
    y     = (op >= 12 && op <= 18) ? {8'h00, ins[7:0]} : m.r[rs];
    alu   = 1'b1;
    taken = 1'b0;
    res   = '0;
    case (op)
      0:       res = y;
      1, 14:   res = x & y;
      2, 15:   res = x | y;
      3, 16:   res = x ^ y;
      4, 17:   res = x + y;
      5, 18:   res = x - y;
      6:       res = y << 1;
      7:       res = (y << 1) | (y >> 15);
      8:       res = word_t'($signed(y) >>> 1);
      9:       res = (y >> 1) | (y << 15);
      10:      res = (y << 8) | (y >> 8);
      11:      res = word_t'(x * y);
      12:      res = {ins[7:0], x[7:0]};
      13:      res = {x[15:8], ins[7:0]};
      default: alu = 1'b0;
    endcase
    m.steps++;
    if (alu) begin
      m.r[rd] = res;
      m.z     = (res == 0);
      m.s     = res[15];
      m.pc    = m.pc + 1;
    end else begin
      case (op)
        19: begin m.r[rd] = m.mem[ins[7:2]]; m.link = ins[7:2]; end
        20: begin m.mem[ins[10:5]] = m.r[ins[4:2]]; m.link = ins[10:5]; end
        21: taken = 1'b1;
        22: taken = m.z;
        23: taken = !m.z;
        24: taken = !m.s && !m.z;
        25: taken = m.s;
        default: ;
      endcase
      if (op == 26)  m.halted = 1'b1;
      else if (taken) m.pc = ins[10:5];
      else            m.pc = m.pc + 1;
    end
    return taken;
  endfunction
endpackage
