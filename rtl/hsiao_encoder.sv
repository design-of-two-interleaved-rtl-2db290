// hsiao_encoder: (24,16) Hsiao SEC-DED encoder.
//
// Check bit r is the XOR of the data bits whose Hsiao H-matrix column has a
// one in row r (edac_pkg::HSIAO_H). Each row has six ones, so every check bit
// is a six-input XOR and the block is one level of XOR trees with no state.
// The matrix follows the design's three Hsiao rules (odd-weight columns,
// fewest ones, equal row weights); the particular column choice is the first
// balanced set found in lexicographic order.
//
// Interface: d (16 data bits) in, c (8 check bits, c[r] = row r+1) out.
// Timing: purely combinational.
module hsiao_encoder
  import edac_pkg::*;
(
  input  logic [K-1:0] d,
  output logic [R-1:0] c
);

  always_comb begin
    for (int unsigned r = 0; r < R; r++)
      c[r] = ^(d & row_mask(CODE_HSIAO, r));
  end

endmodule
