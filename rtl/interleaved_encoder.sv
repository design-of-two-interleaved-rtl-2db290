// interleaved_encoder: 32-bit data to a 48-bit interleaved SEC-DED codeword.
//
// Two identical (24,16) encoders work side by side. The even encoder takes
// the data bits d[0], d[2], ..., d[30]; the odd encoder takes d[1], d[3], ...,
// d[31]. Their check bits are interleaved the same way: even check bit k goes
// to chk[2k], odd check bit k to chk[2k+1]. The word is stored as the
// codeword cw = {chk, d}, so every codeword bit with an even index belongs to
// the even code and every odd-indexed bit to the odd code, across the
// data/check boundary too (cw[31] is odd data, cw[32] is even check). Any two
// adjacent codeword bits therefore fall in different halves.
//
// Parameter CODE selects Hsiao or CRC for both halves.
// Interface: d (32) in, chk (16) out; 48 signals in all. Purely combinational.
module interleaved_encoder
  import edac_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO
) (
  input  logic [DATA_W-1:0] d,
  output logic [CHK_W-1:0]  chk
);

  logic [K-1:0] d_even, d_odd;
  logic [R-1:0] c_even, c_odd;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      d_even[i] = d[2*i];
      d_odd[i]  = d[2*i+1];
    end
  end

  if (CODE == CODE_HSIAO) begin : g_hsiao
    hsiao_encoder u_even (.d(d_even), .c(c_even));
    hsiao_encoder u_odd  (.d(d_odd),  .c(c_odd));
  end else begin : g_crc
    crc_encoder u_even (.d(d_even), .c(c_even));
    crc_encoder u_odd  (.d(d_odd),  .c(c_odd));
  end

  always_comb begin
    for (int unsigned k = 0; k < R; k++) begin
      chk[2*k]   = c_even[k];
      chk[2*k+1] = c_odd[k];
    end
  end

endmodule
