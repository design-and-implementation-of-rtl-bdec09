// shift_unit: the ALU's shift sub-module, moving a word by one bit place or
// exchanging its two bytes.
//
// `sel`: 3'd0 SL  shift left, a zero enters bit 0;
//        3'd1 RL  rotate left, bit W-1 enters bit 0;
//        3'd2 SR  shift right keeping the sign bit, i.e. divide a two's
//                 complement value by 2 (rounding toward minus infinity);
//        3'd3 RR  rotate right, bit 0 enters bit W-1;
//        3'd4 SWAP exchange the high and low halves (bytes for W = 16);
//        others pass the operand through.
// The operations are the design's; the one-place distance (the instruction
// has no field for a count), the sign-keeping right shift and the byte
// exchange as the meaning of SWAP are this design's choices. Combinational.
module shift_unit #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [2:0]   sel,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      3'd0:    y = {a[W-2:0], 1'b0};
      3'd1:    y = {a[W-2:0], a[W-1]};
      3'd2:    y = {a[W-1], a[W-1:1]};
      3'd3:    y = {a[0], a[W-1:1]};
      3'd4:    y = {a[W/2-1:0], a[W-1:W/2]};
      default: y = a;
    endcase
  end
endmodule
