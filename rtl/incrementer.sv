// incrementer: adds one to a W-bit pointer (the program counter's next
// address).
//
// Built as a chain of half adders: bit i flips when every lower bit is one,
// and the carry into bit i is the AND of all lower bits. No general adder is
// used, which is the point of a dedicated incrementer. The design uses a 6-bit
// instruction pointer, so W defaults to 6; the sum wraps to zero past the
// last address and the wrap is reported on `carry_out`.
// Purely combinational. The transistor-level logic style the original
// incrementer used is a circuit choice below RTL and is not modelled.
module incrementer #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y,
  output logic         carry_out
);
  logic [W:0] c;   // c[i]: carry into bit i, i.e. all bits below i are one

  assign c[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_ha
    assign y[i]   = a[i] ^ c[i];
    assign c[i+1] = a[i] & c[i];
  end
  assign carry_out = c[W];
endmodule
