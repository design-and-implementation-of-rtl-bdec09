// tb_carry_select_adder: random and corner-case sums of the 16-bit carry
// select adder compared with {carry, sum} = a + b + cin.
module tb_carry_select_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, s;
  logic         ci, co;
  int checks = 0, failures = 0;

  carry_select_adder #(.W(W)) dut (.a, .b, .carry_in(ci), .sum(s), .carry_out(co));

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] ref_v;
    a = x; b = y; ci = c;
    #1;
    ref_v = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    checks++;
    if ({co, s} != ref_v) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %h", x, y, c, co, s, ref_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 0);
    check('1, '0, 1);
    check('1, '1, 1);
    check(16'h000f, 16'h0001, 0);  // carry out of the first block
    check(16'h0ff0, 16'h0010, 0);  // carry rippling through selected blocks
    check(16'h7fff, 16'h0001, 0);
    for (int i = 0; i < 5000; i++)
      check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
