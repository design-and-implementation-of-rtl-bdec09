// logic_unit: the ALU's logic sub-module, bitwise AND, OR and XOR of two
// words.
//
// `sel` picks the operation: 2'd0 AND, 2'd1 OR, 2'd2 XOR; 2'd3 returns
// operand b unchanged (used for MOV). The three operations are those the
// design names; the select encoding is this design's choice. Combinational.
module logic_unit #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [1:0]   sel,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      2'd0:    y = a & b;
      2'd1:    y = a | b;
      2'd2:    y = a ^ b;
      default: y = b;
    endcase
  end
endmodule
