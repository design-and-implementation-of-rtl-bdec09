// tb_arith_unit: a + b and a - b of the arithmetic unit, modulo 2^16, on
// random and corner operands.
module tb_arith_unit;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, y, exp_y;
  logic         sub;
  int checks = 0, failures = 0;

  arith_unit #(.W(W)) dut (.a, .b, .sub, .y);

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] z, input logic s);
    a = x; b = z; sub = s;
    #1;
    exp_y = s ? x - z : x + z;
    checks++;
    if (y != exp_y) begin
      failures++;
      $display("FAIL %h %s %h = %h, expected %h", x, s ? "-" : "+", z, y, exp_y);
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
    check(16'd5, 16'd7, 1);
    check(16'd0, 16'd1, 1);
    check(16'hffff, 16'd1, 0);
    check(16'h8000, 16'h8000, 1);
    for (int i = 0; i < 4000; i++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
