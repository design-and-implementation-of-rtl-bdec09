// arith_unit: the ALU's arithmetic sub-module, a + b or a - b on the carry
// select adder.
//
// Subtraction adds the one's complement of b with a carry in of one. The
// carry out is left unused, as in the design, which does not keep a carry
// flag. Combinational.
module arith_unit #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);
  logic unused_cout;

  carry_select_adder #(.W(W)) u_csa (
    .a        (a),
    .b        (sub ? ~b : b),
    .carry_in (sub),
    .sum      (y),
    .carry_out(unused_cout)
  );
endmodule
