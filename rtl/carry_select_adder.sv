// carry_select_adder: W-bit adder with carry in, split into BLK-bit blocks.
//
// The lowest block is a ripple-carry adder fed by carry_in. Every higher block
// computes two ripple-carry sums at once, one assuming a carry in of 0 and one
// assuming 1, and the real carry out of the block below selects between them.
// The carry path through the word is thus one multiplexer per block instead
// of one full adder per bit. 16 bits follow the processor's word width; the
// block size of 4 is this design's choice (the internal arrangement of the
// original "modified" adder is not specified). Purely combinational.
module carry_select_adder #(
  parameter int unsigned W   = 16,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         carry_in,
  output logic [W-1:0] sum,
  output logic         carry_out
);
  localparam int unsigned NBLK = (W + BLK - 1) / BLK;

  logic [NBLK:0] c;   // carry into each block
  assign c[0] = carry_in;

  // Ripple-carry sum of one BLK-bit block for a given carry in; returns
  // {carry_out, sum}.
  function automatic logic [BLK:0] ripple(input logic [BLK-1:0] x,
                                          input logic [BLK-1:0] yb,
                                          input logic cin);
    logic [BLK:0] r;
    logic         k;
    k = cin;
    for (int i = 0; i < BLK; i++) begin
      r[i] = x[i] ^ yb[i] ^ k;
      k    = (x[i] & yb[i]) | (x[i] & k) | (yb[i] & k);
    end
    r[BLK] = k;
    return r;
  endfunction

  // Operands zero-padded to whole blocks.
  logic [NBLK*BLK-1:0] ap, bp, sp;
  assign ap = (NBLK*BLK)'(a);
  assign bp = (NBLK*BLK)'(b);

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    if (k == 0) begin : g_first
      logic [BLK:0] r;
      assign r = ripple(ap[BLK-1:0], bp[BLK-1:0], c[0]);
      assign sp[BLK-1:0] = r[BLK-1:0];
      assign c[1]        = r[BLK];
    end else begin : g_sel
      logic [BLK:0] r0, r1;
      assign r0 = ripple(ap[k*BLK +: BLK], bp[k*BLK +: BLK], 1'b0);
      assign r1 = ripple(ap[k*BLK +: BLK], bp[k*BLK +: BLK], 1'b1);
      assign sp[k*BLK +: BLK] = c[k] ? r1[BLK-1:0] : r0[BLK-1:0];
      assign c[k+1]           = c[k] ? r1[BLK]     : r0[BLK];
    end
  end

  assign sum = sp[W-1:0];
  // With W a multiple of BLK the carry out of the last block is the word's;
  // otherwise the carry lands in the first padding bit of the sum.
  assign carry_out = (NBLK*BLK == W) ? c[NBLK] : sp[W % BLK == 0 ? W-1 : W];
endmodule
