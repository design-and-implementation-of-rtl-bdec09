// tb_wallace_multiplier: low 16 bits of the Wallace tree product compared
// with a * b for corner cases, signed small operands and random operands.
module tb_wallace_multiplier;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, p;
  int checks = 0, failures = 0;

  wallace_multiplier #(.W(W)) dut (.a, .b, .p);

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [2*W-1:0] full;
    a = x; b = y;
    #1;
    full = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    checks++;
    if (p != full[W-1:0]) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, full[W-1:0]);
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
    check('0, '0);
    check('1, '1);
    check('1, 16'd1);
    check(16'h8000, 16'h0001);
    check(16'hffff, 16'h0002);
    check(16'd189, 16'd14);          // largest convolution product
    check(-16'sd63, 16'sd7);         // negative operand, two's complement
    check(-16'sd7, -16'sd126);
    for (int i = 0; i < 3000; i++)
      check(W'($urandom), W'($urandom));
    for (int i = 0; i < 1000; i++)
      check(W'($signed(8'($urandom))), W'($signed(8'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
