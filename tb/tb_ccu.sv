// tb_ccu: takes the clock control unit through IDLE -> RUN -> HALTED ->
// RUN, checking every enable in each state, that alu_en follows the decoded
// instruction class, that HALT freezes the PC in its own cycle, and that the
// cycle counter equals the number of instructions run including HALT.
module tb_ccu;
  import risc_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  start, halt, alu_inst;
  logic  pc_en, pc_clear, idu_en, alu_en, we_t, running, halted;
  word_t cycles;
  int checks = 0, failures = 0;

  ccu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input string what, input logic e_run, input logic e_halted,
                            input logic e_pc, input logic e_clr, input logic e_alu);
    #1;
    checks++;
    if (running != e_run || halted != e_halted || pc_en != e_pc || pc_clear != e_clr ||
        alu_en != e_alu || idu_en != e_run || we_t != e_run) begin
      failures++;
      $display("FAIL %s: run=%b halted=%b pc_en=%b clr=%b alu_en=%b idu_en=%b we_t=%b",
               what, running, halted, pc_en, pc_clear, alu_en, idu_en, we_t);
    end
  endtask

  task automatic run_program(input int n);
    @(negedge clk);
    start = 1; halt = 0; alu_inst = 0;
    expect_out("start", 0, cycles != 0 || halted, 0, 1, 0);
    @(negedge clk);
    start = 0;
    for (int i = 0; i < n - 1; i++) begin
      alu_inst = 1'($urandom);
      expect_out("run", 1, 0, 1, 0, alu_inst);
      @(negedge clk);
    end
    halt = 1; alu_inst = 0;
    expect_out("halt cycle", 1, 0, 0, 0, 0);
    @(negedge clk);
    halt = 0;
    expect_out("halted", 0, 1, 0, 0, 0);
    checks++;
    if (cycles != word_t'(n)) begin
      failures++;
      $display("FAIL cycles=%0d expected %0d", cycles, n);
    end
    repeat (3) @(negedge clk);
    alu_inst = 1;
    expect_out("stays halted", 0, 1, 0, 0, 0);
  endtask

  initial begin
    start = 0; halt = 0; alu_inst = 0;
    #12 rst_n = 1;
    @(negedge clk);
    alu_inst = 1;
    expect_out("idle", 0, 0, 0, 0, 0);
    run_program(26);
    run_program(5);
    run_program(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
