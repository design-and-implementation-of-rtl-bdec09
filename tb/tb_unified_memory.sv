// tb_unified_memory: fills all 64 words through the data port, then reads
// them back on both ports, rewrites random words and checks that a write
// happens only with `we` high and that a same-cycle read sees the old word.
module tb_unified_memory;
  import risc_pkg::*;
  logic   clk = 0;
  maddr_t iaddr, daddr;
  word_t  idata, ddata, wdata;
  logic   we;
  word_t  model [MEM_WORDS];
  int checks = 0, failures = 0;

  unified_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input maddr_t a, input word_t d, input logic en);
    @(negedge clk);
    daddr = a; wdata = d; we = en;
    #1;
    checks++;
    if (ddata != model[a]) begin   // read before the edge returns the old word
      failures++;
      $display("FAIL old word at %0d: %h exp %h", a, ddata, model[a]);
    end
    @(posedge clk);
    if (en) model[a] = d;
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    we = 0; iaddr = '0; daddr = '0; wdata = '0;
    for (int i = 0; i < MEM_WORDS; i++) begin
      @(negedge clk);
      daddr = maddr_t'(i); wdata = word_t'(i * 16'h0101 + 16'h5a); we = 1;
      @(posedge clk);
      model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 300; n++)
      write(maddr_t'($urandom), word_t'($urandom), 1'($urandom));
    for (int i = 0; i < MEM_WORDS; i++) begin
      iaddr = maddr_t'(i); daddr = maddr_t'(MEM_WORDS - 1 - i);
      #1;
      checks++;
      if (idata != model[i] || ddata != model[MEM_WORDS-1-i]) begin
        failures++;
        $display("FAIL read %0d: %h exp %h / %0d: %h exp %h", i, idata, model[i],
                 MEM_WORDS-1-i, ddata, model[MEM_WORDS-1-i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
