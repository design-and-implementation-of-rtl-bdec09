// tb_register_file: writes random words to random registers and checks all
// three read ports against a reference array; also checks reset clearing,
// that `we` low writes nothing, and R0..R7 independence.
module tb_register_file;
  import risc_pkg::*;
  logic   clk = 0, rst_n = 0;
  raddr_t rs_addr, rd_addr, dbg_addr, waddr;
  word_t  rs_data, rd_data, dbg_data, wdata;
  logic   we;
  word_t  model [NREGS];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < NREGS; i++) begin
      rs_addr = raddr_t'(i); rd_addr = raddr_t'(NREGS-1-i); dbg_addr = raddr_t'(i);
      #1;
      checks++;
      if (rs_data != model[i] || rd_data != model[NREGS-1-i] || dbg_data != model[i]) begin
        failures++;
        $display("FAIL read R%0d: rs=%h dbg=%h exp=%h; R%0d: rd=%h exp=%h", i, rs_data,
                 dbg_data, model[i], NREGS-1-i, rd_data, model[NREGS-1-i]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; rs_addr = '0; rd_addr = '0; dbg_addr = '0;
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    #12 rst_n = 1;
    check_reads();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = raddr_t'($urandom);
      wdata = word_t'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
