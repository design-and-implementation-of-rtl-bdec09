// tb_incrementer: exhaustive check of the 6-bit incrementer against a + 1,
// including the wrap from 63 to 0 and its carry out.
module tb_incrementer;
  localparam int unsigned W = 6;
  logic [W-1:0] a, y;
  logic         co;
  int checks = 0, failures = 0;

  incrementer #(.W(W)) dut (.a, .y, .carry_out(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      a = W'(i);
      #1;
      checks++;
      if ({co, y} != (W+1)'(i + 1)) begin
        failures++;
        $display("FAIL a=%0d y=%0d co=%0b", a, y, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
