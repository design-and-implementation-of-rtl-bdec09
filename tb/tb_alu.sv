// tb_alu: every ALU operation on random and corner operands against a
// behavioural reference (SystemVerilog operators), plus the Zero/Sign flag
// register: flags follow the result at the clock edge only when alu_en is
// high, and hold otherwise.
module tb_alu;
  import risc_pkg::*;
  logic    clk = 0, rst_n = 0, alu_en;
  alu_op_e op;
  word_t   a, b, result, exp_r;
  logic    zero_flag, sign_flag, exp_z, exp_s;
  int checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t y);
    case (o)
      ALU_PASS_B: return y;
      ALU_AND:    return x & y;
      ALU_OR:     return x | y;
      ALU_XOR:    return x ^ y;
      ALU_ADD:    return x + y;
      ALU_SUB:    return x - y;
      ALU_SL:     return y << 1;
      ALU_RL:     return {y[14:0], y[15]};
      ALU_SR:     return word_t'($signed(y) >>> 1);
      ALU_RR:     return {y[0], y[15:1]};
      ALU_SWAP:   return {y[7:0], y[15:8]};
      ALU_MUL:    return x * y;
      ALU_LHI:    return {y[7:0], x[7:0]};
      ALU_LLI:    return {x[15:8], y[7:0]};
      default:    return y;
    endcase
  endfunction

  task automatic check(input alu_op_e o, input word_t x, input word_t y, input logic en);
    @(negedge clk);
    op = o; a = x; b = y; alu_en = en;
    #1;
    exp_r = ref_alu(o, x, y);
    checks++;
    if (result != exp_r) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h result=%h exp=%h", o, x, y, result, exp_r);
    end
    if (en) begin
      exp_z = (exp_r == 0);
      exp_s = exp_r[15];
    end
    @(posedge clk);
    #1;
    checks++;
    if (zero_flag != exp_z || sign_flag != exp_s) begin
      failures++;
      $display("FAIL flags op=%0d en=%b Z=%b S=%b exp %b %b", o, en, zero_flag, sign_flag,
               exp_z, exp_s);
    end
  endtask

  initial begin
    alu_en = 0; op = ALU_PASS_B; a = '0; b = '0; exp_z = 0; exp_s = 0;
    #12 rst_n = 1;
    check(ALU_SUB, 16'd5, 16'd5, 1);      // zero result sets Z
    check(ALU_SUB, 16'd5, 16'd6, 1);      // negative result sets S
    check(ALU_ADD, 16'd1, 16'd1, 0);      // flags hold
    check(ALU_SR, '0, 16'hfffc, 1);       // -4 / 2 = -2
    check(ALU_MUL, 16'hffc1, 16'd7, 1);   // -63 * 7
    for (int o = 0; o <= 13; o++)
      for (int i = 0; i < 200; i++)
        check(alu_op_e'(o), word_t'($urandom), ($urandom % 8 == 0) ? '0 : word_t'($urandom),
              1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
