// tb_risc_top: end-to-end test of the processor at its default size.
//
// Each program is written into memory through the host port, started, and
// run to HALT; the result is compared with an instruction-set reference
// model running the same memory image: all eight registers, all 64 memory
// words, the flags, the PC (left on the HALT), the link register, and the
// cycle count, which must equal the number of instructions executed (one
// cycle per instruction). Programs: a directed one using all 27 instructions,
// a count-down loop built on a backward conditional jump, and random
// programs with forward jumps. The test counts how often each mechanism
// occurred (every opcode, taken and not-taken conditional jumps, Zero and
// Sign flags set, loads, stores, halts and restarts) and fails on one that
// never did.
module tb_risc_top;
  import risc_pkg::*;
  import tb_asm_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0;
  logic   host_we = 0;
  maddr_t host_addr = '0;
  word_t  host_wdata = '0, host_rdata;
  raddr_t dbg_reg_addr = '0;
  word_t  dbg_reg_data, cycles;
  logic   running, halted, zero_flag, sign_flag;
  maddr_t pc, link;

  risc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int op_count [32];
  int n_taken = 0, n_not_taken = 0, n_zero = 0, n_sign = 0, n_halt = 0, n_restart = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int addr, input word_t data);
    @(negedge clk);
    host_addr = maddr_t'(addr); host_wdata = data; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Load the image, run it on the DUT and on the model, compare everything.
  task automatic run_and_compare(input string name, ref word_t image [64]);
    iss_t m;
    int   limit;
    for (int i = 0; i < 64; i++) begin
      host_write(i, image[i]);
      m.mem[i] = image[i];
    end
    // The model starts from the state the previous program left behind.
    for (int i = 0; i < 8; i++) begin
      dbg_reg_addr = raddr_t'(i);
      #1 m.r[i] = dbg_reg_data;
    end
    m.z = zero_flag; m.s = sign_flag; m.link = link;
    m.pc = '0; m.halted = 0; m.steps = 0;
    if (halted) n_restart++;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    limit = 0;
    while (!m.halted && limit < 5000) begin
      int   op;
      logic t;
      op = int'(m.mem[m.pc][15:11]);
      op_count[op]++;
      t = iss_step(m);
      if (op >= 22 && op <= 25) begin
        if (t) n_taken++; else n_not_taken++;
      end
      if (op <= 18) begin
        if (m.z) n_zero++;
        if (m.s) n_sign++;
      end
      limit++;
    end
    n_halt++;
    wait (halted);
    @(negedge clk);
    chk($sformatf("%s: cycles %0d, model %0d", name, cycles, m.steps), cycles == word_t'(m.steps));
    chk($sformatf("%s: pc %0d, model %0d", name, pc, m.pc), pc == m.pc);
    chk($sformatf("%s: link %0d, model %0d", name, link, m.link), link == m.link);
    chk($sformatf("%s: flags Z%b S%b, model Z%b S%b", name, zero_flag, sign_flag, m.z, m.s),
        zero_flag == m.z && sign_flag == m.s);
    for (int i = 0; i < 8; i++) begin
      dbg_reg_addr = raddr_t'(i);
      #1;
      chk($sformatf("%s: R%0d = %h, model %h", name, i, dbg_reg_data, m.r[i]),
          dbg_reg_data == m.r[i]);
    end
    for (int i = 0; i < 64; i++) begin
      host_addr = maddr_t'(i);
      #1;
      chk($sformatf("%s: mem[%0d] = %h, model %h", name, i, host_rdata, m.mem[i]),
          host_rdata == m.mem[i]);
    end
  endtask

  word_t img [64];

  task automatic clear_image();
    for (int i = 0; i < 64; i++) img[i] = '0;
  endtask

  initial begin
    for (int i = 0; i < 32; i++) op_count[i] = 0;
    #12 rst_n = 1;

    // ---- directed program: every instruction at least once ----
    clear_image();
    img[0]  = f_load(0, 48);            // R0 = 0x1234
    img[1]  = f_load(1, 49);            // R1 = 0x00f0
    img[2]  = f_reg(OP_MOV, 2, 0);
    img[3]  = f_reg(OP_AND, 2, 1);
    img[4]  = f_reg(OP_OR, 2, 0);
    img[5]  = f_reg(OP_XOR, 2, 1);
    img[6]  = f_reg(OP_ADD, 2, 0);
    img[7]  = f_reg(OP_SUB, 2, 2);      // zero
    img[8]  = f_jump(OP_JNZ, 63);       // not taken
    img[9]  = f_jump(OP_JZ, 11);        // taken
    img[10] = f_halt();                 // skipped
    img[11] = f_reg(OP_SL, 3, 0);
    img[12] = f_reg(OP_RL, 3, 3);
    img[13] = f_reg(OP_SR, 4, 3);
    img[14] = f_reg(OP_RR, 4, 4);
    img[15] = f_reg(OP_SWAP, 5, 0);
    img[16] = f_reg(OP_MUL, 5, 1);
    img[17] = f_imm(OP_LHI, 6, 8'h9a);  // negative
    img[18] = f_jump(OP_JP, 63);        // not taken (sign set)
    img[19] = f_jump(OP_JN, 21);        // taken
    img[20] = f_halt();
    img[21] = f_imm(OP_LLI, 6, 8'hbc);
    img[22] = f_imm(OP_ANDI, 6, 8'h0f);
    img[23] = f_imm(OP_ORI, 7, 8'h81);
    img[24] = f_imm(OP_XORI, 7, 8'hff);
    img[25] = f_imm(OP_ADDI, 7, 8'h20);
    img[26] = f_jump(OP_JP, 28);        // taken (positive)
    img[27] = f_halt();
    img[28] = f_imm(OP_SUBI, 7, 8'h40);
    img[29] = f_store(50, 7);
    img[30] = f_store(51, 5);
    img[31] = f_jump(OP_JMP, 33);
    img[32] = f_halt();
    img[33] = {5'd27, 11'h000};         // reserved opcode: no operation
    img[34] = f_halt();
    img[48] = 16'h1234;
    img[49] = 16'h00f0;
    run_and_compare("directed", img);

    // ---- loop: count R1 down from 5, accumulating R2 += R1 ----
    clear_image();
    img[0] = f_imm(OP_LLI, 1, 5);
    img[1] = f_imm(OP_LHI, 1, 0);
    img[2] = f_reg(OP_XOR, 2, 2);
    img[3] = f_reg(OP_ADD, 2, 1);       // loop:
    img[4] = f_imm(OP_SUBI, 1, 1);
    img[5] = f_jump(OP_JNZ, 3);         // backward, taken 4 times
    img[6] = f_store(40, 2);
    img[7] = f_halt();
    run_and_compare("loop", img);
    dbg_reg_addr = 3'd2;
    #1 chk("loop sum 15", dbg_reg_data == 16'd15);

    // ---- random programs with forward jumps ----
    for (int p = 0; p < 40; p++) begin
      int len;
      clear_image();
      len = 20 + int'($urandom % 16);
      for (int i = 0; i < len; i++) begin
        int k;
        k = int'($urandom % 32);
        if (k <= 11)
          img[i] = f_reg(opcode_e'(k), int'($urandom % 8), int'($urandom % 8));
        else if (k <= 18)
          img[i] = f_imm(opcode_e'(k), int'($urandom % 8), int'($urandom % 256));
        else if (k == 19)
          img[i] = f_load(int'($urandom % 8), 40 + int'($urandom % 24));
        else if (k == 20)
          img[i] = f_store(40 + int'($urandom % 24), int'($urandom % 8));
        else if (k <= 25)
          img[i] = f_jump(opcode_e'(k), i + 1 + int'($urandom % (len - i)));
        else
          img[i] = {5'(27 + $urandom % 5), 11'($urandom)};   // reserved
      end
      img[len] = f_halt();
      for (int i = 40; i < 64; i++) img[i] = word_t'($urandom);
      run_and_compare($sformatf("random %0d", p), img);
    end

    // ---- mechanism coverage ----
    for (int op = 0; op <= 26; op++)
      chk($sformatf("opcode %0d executed %0d times", op, op_count[op]), op_count[op] > 0);
    chk($sformatf("conditional jumps taken %0d", n_taken), n_taken > 0);
    chk($sformatf("conditional jumps not taken %0d", n_not_taken), n_not_taken > 0);
    chk($sformatf("zero flag set %0d", n_zero), n_zero > 0);
    chk($sformatf("sign flag set %0d", n_sign), n_sign > 0);
    chk($sformatf("halts %0d, restarts after halt %0d", n_halt, n_restart),
        n_halt > 0 && n_restart > 0);
    $display("coverage: taken=%0d not_taken=%0d zero=%0d sign=%0d loads=%0d stores=%0d halts=%0d restarts=%0d",
             n_taken, n_not_taken, n_zero, n_sign, op_count[19], op_count[20], n_halt, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
