// alu: arithmetic and logic unit of the processor, with its Zero and Sign
// flag register.
//
// Operand a is the destination register's value and operand b the source
// register or the zero-extended 8-bit immediate. The arithmetic sub-module
// (carry select adder) does ADD/SUB, the logic sub-module AND/OR/XOR/MOV,
// the shift sub-module SL/RL/SR/RR/SWAP, and the Wallace tree multiplier MUL
// (low 16 bits of a * b). LHI and LLI merge the immediate into the high or
// low byte of a. `result` is combinational and is written back to the
// destination register at the clock edge that ends the instruction.
// At that same edge, when `alu_en` is high, the flags take Zero = (result == 0)
// and Sign = result[15]; they hold otherwise and clear on reset. The flags
// feed the conditional jumps. There is no carry flag, as in the design.
// Updating the flags on every ALU instruction follows the design; flags on
// logic and shift results as well as arithmetic ones is this design's reading.
module alu
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    alu_en,     // from the clock control unit: this is an ALU instruction
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    zero_flag,
  output logic    sign_flag
);
  word_t      arith_y, logic_y, shift_y, mul_y;
  logic [1:0] logic_sel;
  logic [2:0] shift_sel;

  always_comb begin
    unique case (op)
      ALU_AND: logic_sel = 2'd0;
      ALU_OR:  logic_sel = 2'd1;
      ALU_XOR: logic_sel = 2'd2;
      default: logic_sel = 2'd3;
    endcase
    unique case (op)
      ALU_SL:  shift_sel = 3'd0;
      ALU_RL:  shift_sel = 3'd1;
      ALU_SR:  shift_sel = 3'd2;
      ALU_RR:  shift_sel = 3'd3;
      default: shift_sel = 3'd4;
    endcase
  end

  arith_unit #(.W(XLEN)) u_arith (
    .a(a), .b(b), .sub(op == ALU_SUB), .y(arith_y)
  );
  logic_unit #(.W(XLEN)) u_logic (
    .a(a), .b(b), .sel(logic_sel), .y(logic_y)
  );
  shift_unit #(.W(XLEN)) u_shift (
    .a(b), .sel(shift_sel), .y(shift_y)
  );
  wallace_multiplier #(.W(XLEN)) u_mul (
    .a(a), .b(b), .p(mul_y)
  );

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB:                         result = arith_y;
      ALU_AND, ALU_OR, ALU_XOR, ALU_PASS_B:     result = logic_y;
      ALU_SL, ALU_RL, ALU_SR, ALU_RR, ALU_SWAP: result = shift_y;
      ALU_MUL:                                  result = mul_y;
      ALU_LHI:                                  result = {b[7:0], a[7:0]};
      ALU_LLI:                                  result = {a[15:8], b[7:0]};
      default:                                  result = b;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zero_flag <= 1'b0;
      sign_flag <= 1'b0;
    end else if (alu_en) begin
      zero_flag <= (result == '0);
      sign_flag <= result[XLEN-1];
    end
  end
endmodule
