// wallace_multiplier: single-cycle W x W multiplier returning the low W bits
// of the product, reduced by a Wallace tree of 4:2 compressors.
//
// The W*W partial-product bits a[j] & b[i] are sorted into columns by weight
// i+j; columns at or above W are dropped, because only the low W bits are
// kept. Each reduction stage then compresses every column in parallel: groups
// of four bits go through a 4:2 compressor (two full adders), whose sum stays
// in the column, whose carry goes to the next column of the next stage, and
// whose fast carry out feeds the carry in of a compressor in the next column
// of the same stage; a leftover group of three goes through a full adder, and
// one or two leftover bits pass straight on. Stages repeat until no column
// holds more than two bits (a stage on such columns changes nothing), and the
// two remaining rows are added by the carry select adder.
// Because only the low W bits are kept, the result is the same for signed
// (two's complement) and unsigned operands. W = 16 matches the register
// width; multiplying whole registers and keeping the low half is this
// design's choice. Purely combinational.
module wallace_multiplier #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  localparam int unsigned H      = 2 * W;  // room per column, above any height reached
  // Each stage roughly halves the tallest column; two spare stages cover
  // the carries that columns receive from their neighbours.
  localparam int unsigned STAGES = $clog2(W) + 2;

  // {sum, carry, cout} of a 4:2 compressor built from two full adders.
  function automatic logic [2:0] comp42(input logic x1, x2, x3, x4, cin);
    logic s1, co, s, c;
    s1 = x1 ^ x2 ^ x3;
    co = (x1 & x2) | (x1 & x3) | (x2 & x3);
    s  = s1 ^ x4 ^ cin;
    c  = (s1 & x4) | (s1 & cin) | (x4 & cin);
    return {s, c, co};
  endfunction

  logic [W-1:0] row0, row1;

  always_comb begin
    logic [H-1:0] bits  [W];
    logic [H-1:0] nbits [W];
    int           cnt   [W];
    int           ncnt  [W];
    logic [H-1:0] pco;        // fast carries out of the previous column
    logic [H-1:0] cco;        // fast carries out of this column
    int           pco_n, nc, rem, base;
    logic [2:0]   r;

    r    = '0;
    row0 = '0;
    row1 = '0;

    // Partial products, column by column.
    for (int c = 0; c < W; c++) begin
      bits[c] = '0;
      cnt[c]  = 0;
    end
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        if (i + j < W) begin
          bits[i+j][cnt[i+j]] = a[j] & b[i];
          cnt[i+j]++;
        end

    // Reduction stages.
    for (int st = 0; st < STAGES; st++) begin
      for (int c = 0; c < W; c++) begin
        nbits[c] = '0;
        ncnt[c]  = 0;
      end
      pco   = '0;
      pco_n = 0;
      for (int c = 0; c < W; c++) begin
        nc   = cnt[c] / 4;
        rem  = cnt[c] % 4;
        base = 4 * nc;
        cco  = '0;
        for (int k = 0; k < H / 4; k++) begin
          if (k < nc) begin
            r = comp42(bits[c][4*k], bits[c][4*k+1], bits[c][4*k+2],
                       bits[c][4*k+3], (k < pco_n) ? pco[k] : 1'b0);
            nbits[c][ncnt[c]] = r[2];
            ncnt[c]++;
            if (c + 1 < W) begin
              nbits[c+1][ncnt[c+1]] = r[1];
              ncnt[c+1]++;
            end
            cco[k] = r[0];
          end
        end
        // Fast carries from the column below that found no compressor here.
        for (int k = 0; k < H / 4; k++) begin
          if (k >= nc && k < pco_n) begin
            nbits[c][ncnt[c]] = pco[k];
            ncnt[c]++;
          end
        end
        // Leftover bits: three go through a full adder, fewer pass on.
        if (rem == 3) begin
          nbits[c][ncnt[c]] = bits[c][base] ^ bits[c][base+1] ^ bits[c][base+2];
          ncnt[c]++;
          if (c + 1 < W) begin
            nbits[c+1][ncnt[c+1]] = (bits[c][base] & bits[c][base+1]) |
                                    (bits[c][base] & bits[c][base+2]) |
                                    (bits[c][base+1] & bits[c][base+2]);
            ncnt[c+1]++;
          end
        end else begin
          for (int k = 0; k < 2; k++) begin
            if (k < rem) begin
              nbits[c][ncnt[c]] = bits[c][base+k];
              ncnt[c]++;
            end
          end
        end
        pco   = cco;
        pco_n = nc;
      end
      bits = nbits;
      cnt  = ncnt;
    end

    for (int c = 0; c < W; c++) begin
      row0[c] = (cnt[c] > 0) ? bits[c][0] : 1'b0;
      row1[c] = (cnt[c] > 1) ? bits[c][1] : 1'b0;
    end
  end

  // Final carry-propagate addition of the two remaining rows.
  logic unused_cout;
  carry_select_adder #(.W(W)) u_cpa (
    .a(row0), .b(row1), .carry_in(1'b0), .sum(p), .carry_out(unused_cout)
  );
endmodule
