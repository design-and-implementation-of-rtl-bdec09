// tb_shift_unit: shift left, rotate left, sign-keeping shift right, rotate
// right and byte swap on random and corner values, against arithmetic
// definitions (multiply/divide by two, bit moves).
module tb_shift_unit;
  localparam int unsigned W = 16;
  logic [W-1:0] a, y, exp_y;
  logic [2:0]   sel;
  int checks = 0, failures = 0;

  shift_unit #(.W(W)) dut (.a, .sel, .y);

  task automatic check(input logic [W-1:0] x, input logic [2:0] s);
    a = x; sel = s;
    #1;
    case (s)
      3'd0: exp_y = x * 2;
      3'd1: exp_y = (x << 1) | W'(x >> (W-1));
      3'd2: exp_y = W'($signed(x) >>> 1);
      3'd3: exp_y = (x >> 1) | (W'(x[0]) << (W-1));
      3'd4: exp_y = (x << 8) | (x >> 8);
      default: exp_y = x;
    endcase
    checks++;
    if (y != exp_y) begin
      failures++;
      $display("FAIL sel=%0d a=%h y=%h exp=%h", s, x, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      check(16'h8001, 3'(s));
      check(16'hfffe, 3'(s));     // -2 >> 1 = -1
      check(16'h1234, 3'(s));
      for (int i = 0; i < 300; i++) check(W'($urandom), 3'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
