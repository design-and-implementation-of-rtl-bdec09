// tb_program_counter: steps the PC through increments, the wrap at 63, every
// jump condition with every flag combination, the hold when pc_en is low,
// pc_clear, and the link register update on LOAD/STORE.
module tb_program_counter;
  import risc_pkg::*;
  logic   clk = 0, rst_n = 0;
  logic   pc_en, pc_clear, zero_flag, sign_flag, ls_en, taken;
  jcond_e jcond;
  maddr_t jtarget, ls_addr, pc, link;
  word_t  data_in, instruction;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic cond(jcond_e j, logic z, logic s);
    case (j)
      JC_ALWAYS: return 1'b1;
      JC_Z:      return z;
      JC_NZ:     return !z;
      JC_P:      return !s && !z;
      JC_N:      return s;
      default:   return 1'b0;
    endcase
  endfunction

  task automatic step(input logic en, input logic clr, input jcond_e j, input maddr_t t,
                      input logic z, input logic s, input logic ls, input maddr_t la);
    maddr_t exp_pc, exp_link;
    @(negedge clk);
    pc_en = en; pc_clear = clr; jcond = j; jtarget = t; zero_flag = z; sign_flag = s;
    ls_en = ls; ls_addr = la; data_in = word_t'($urandom);
    #1;
    checks++;
    if (instruction != data_in || taken != cond(j, z, s)) begin
      failures++;
      $display("FAIL instruction/taken j=%0d z=%b s=%b taken=%b", j, z, s, taken);
    end
    exp_pc   = clr ? '0 : (en ? (cond(j, z, s) ? t : maddr_t'(pc + 1)) : pc);
    exp_link = (en && ls) ? la : link;
    @(posedge clk);
    #1;
    checks++;
    if (pc != exp_pc || link != exp_link) begin
      failures++;
      $display("FAIL pc=%0d exp %0d link=%0d exp %0d", pc, exp_pc, link, exp_link);
    end
  endtask

  initial begin
    pc_en = 0; pc_clear = 0; jcond = JC_NONE; jtarget = '0; zero_flag = 0; sign_flag = 0;
    ls_en = 0; ls_addr = '0; data_in = '0;
    #12 rst_n = 1;
    #1;
    checks++;
    if (pc != 0 || link != 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 70; i++) step(1, 0, JC_NONE, '0, 0, 0, 0, '0);  // wraps past 63
    for (int j = 0; j < 6; j++)
      for (int f = 0; f < 4; f++)
        step(1, 0, jcond_e'(j), maddr_t'($urandom), f[0], f[1], 0, '0);
    step(0, 0, JC_ALWAYS, 6'd9, 0, 0, 1, 6'd33);  // disabled: nothing moves
    step(1, 0, JC_NONE, '0, 0, 0, 1, 6'd33);
    step(1, 1, JC_ALWAYS, 6'd9, 0, 0, 0, '0);     // clear wins
    for (int i = 0; i < 300; i++)
      step(1'($urandom), ($urandom % 16) == 0, jcond_e'($urandom % 6), maddr_t'($urandom),
           1'($urandom), 1'($urandom), 1'($urandom), maddr_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
