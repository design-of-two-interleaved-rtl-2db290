// crc_encoder: (24,16) CRC-8 SEC-DED encoder, generator x^8 + x^3 + x^2 + 1.
//
// The check bits equal the CRC of the 16-bit message with a zero seed,
// i.e. the remainder of d(x) * x^8 divided by g(x). Instead of a bit-serial
// LFSR the remainder is computed in parallel: check bit r is the XOR of the
// data bits whose column x^(j+8) mod g(x) (edac_pkg::crc_column) has bit r set.
// With a zero seed no seed terms enter the XORs; rows have six or seven ones.
//
// Interface: d (16 data bits) in, c (8 check bits) out.
// Timing: purely combinational.
module crc_encoder
  import edac_pkg::*;
(
  input  logic [K-1:0] d,
  output logic [R-1:0] c
);

  always_comb begin
    for (int unsigned r = 0; r < R; r++)
      c[r] = ^(d & row_mask(CODE_CRC, r));
  end

endmodule
