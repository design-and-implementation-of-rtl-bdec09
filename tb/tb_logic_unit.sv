// tb_logic_unit: AND, OR, XOR and pass-through of the logic unit on random
// operands against the SystemVerilog operators.
module tb_logic_unit;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, y, exp_y;
  logic [1:0]   sel;
  int checks = 0, failures = 0;

  logic_unit #(.W(W)) dut (.a, .b, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom); b = W'($urandom); sel = 2'(i % 4);
      #1;
      case (sel)
        2'd0: exp_y = a & b;
        2'd1: exp_y = a | b;
        2'd2: exp_y = a ^ b;
        default: exp_y = b;
      endcase
      checks++;
      if (y != exp_y) begin
        failures++;
        $display("FAIL sel=%0d a=%h b=%h y=%h exp=%h", sel, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
