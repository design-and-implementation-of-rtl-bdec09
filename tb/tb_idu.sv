// tb_idu: builds instructions of every opcode (and the reserved ones) with
// random fields in the six formats, and checks the decoded register
// addresses, immediate, memory address, jump target and controls against a
// table of what each instruction must do; with idu_en low nothing may act.
module tb_idu;
  import risc_pkg::*;
  logic     idu_en;
  word_t    instr;
  decoded_t dec;
  int checks = 0, failures = 0;

  idu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what, input int opc);
    failures++;
    $display("FAIL opcode %0d: %s (instr=%h)", opc, what, instr);
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int     opc;
      logic   is_reg, is_imm, is_ld, is_st, is_j, is_h;
      alu_op_e exp_op;
      jcond_e  exp_j;
      opc    = n % 32;
      idu_en = (n % 7) != 0;
      instr  = {5'(opc), 11'($urandom)};
      #1;
      is_reg = opc <= 11;
      is_imm = opc >= 12 && opc <= 18;
      is_ld  = opc == 19;
      is_st  = opc == 20;
      is_j   = opc >= 21 && opc <= 25;
      is_h   = opc == 26;
      case (opc)
        1, 14:  exp_op = ALU_AND;
        2, 15:  exp_op = ALU_OR;
        3, 16:  exp_op = ALU_XOR;
        4, 17:  exp_op = ALU_ADD;
        5, 18:  exp_op = ALU_SUB;
        6:      exp_op = ALU_SL;
        7:      exp_op = ALU_RL;
        8:      exp_op = ALU_SR;
        9:      exp_op = ALU_RR;
        10:     exp_op = ALU_SWAP;
        11:     exp_op = ALU_MUL;
        12:     exp_op = ALU_LHI;
        13:     exp_op = ALU_LLI;
        default: exp_op = ALU_PASS_B;
      endcase
      case (opc)
        21: exp_j = JC_ALWAYS;
        22: exp_j = JC_Z;
        23: exp_j = JC_NZ;
        24: exp_j = JC_P;
        25: exp_j = JC_N;
        default: exp_j = JC_NONE;
      endcase
      if (!idu_en) begin
        is_reg = 0; is_imm = 0; is_ld = 0; is_st = 0; is_j = 0; is_h = 0; exp_j = JC_NONE;
      end
      checks++;
      if (dec.op != opcode_e'(opc)) fail("opcode field", opc);
      if (dec.alu_inst != (is_reg || is_imm)) fail("alu_inst", opc);
      if (dec.wb_en != (is_reg || is_imm || is_ld)) fail("wb_en", opc);
      if (dec.load != is_ld || dec.store != is_st || dec.halt != is_h) fail("ld/st/halt", opc);
      if (dec.jcond != exp_j) fail("jump condition", opc);
      if ((is_reg || is_imm) && dec.alu_op != exp_op) fail("alu op", opc);
      if (is_imm != dec.use_imm && idu_en) fail("use_imm", opc);
      if ((is_reg || is_imm || is_ld) && dec.rd != instr[10:8]) fail("rd", opc);
      if (is_reg && dec.rs != instr[7:5]) fail("rs", opc);
      if (is_imm && dec.imm != instr[7:0]) fail("imm", opc);
      if (is_ld && dec.maddr != instr[7:2]) fail("load address", opc);
      if (is_st && (dec.maddr != instr[10:5] || dec.rs != instr[4:2])) fail("store fields", opc);
      if (is_j && dec.jtarget != instr[10:5]) fail("jump target", opc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
