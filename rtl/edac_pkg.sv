// edac_pkg: sizes, types and parity-check matrices shared by the interleaved EDAC.
//
// Each half of the interleaved EDAC is a (24,16) single-error-correcting,
// double-error-detecting (SEC-DED) code: 16 data bits, 8 check bits. Two such
// codes are provided, both written as an 8 x 16 data part of the H-matrix
// followed by an 8 x 8 identity for the check bits:
//
//  * Hsiao: every data column has three ones (odd weight), the 16 columns are
//    distinct, and every row holds exactly six ones (48 ones / 8 rows). The
//    columns below are the first set, in lexicographic order of the C(8,3) = 56
//    weight-3 columns, whose row weights all come to six; that is the search the
//    matrix generator of the design performs.
//  * CRC: the zero-seed CRC-8 with generator g(x) = x^8 + x^3 + x^2 + 1. Data
//    bit j contributes x^(j+8) mod g(x) to the check bits, so column j is that
//    remainder. A zero seed removes the seed terms from the XOR trees. g(x)
//    has the factor (x + 1) and a degree-7 cofactor whose order exceeds 24, so
//    the 24-bit code has minimum distance 4 (SEC-DED).
//
// Column bit r is row r+1 of the matrix, i.e. check bit C(r+1). The row
// weights of both matrices (6 for Hsiao, at most 7 for CRC) set the widest XOR
// in the encoder.
package edac_pkg;

  localparam int unsigned K      = 16;        // data bits per SEC-DED code
  localparam int unsigned R      = 8;         // check bits per SEC-DED code
  localparam int unsigned N      = K + R;     // code length of one half
  localparam int unsigned DATA_W = 2 * K;     // data bits of the interleaved word
  localparam int unsigned CHK_W  = 2 * R;     // check bits of the interleaved word
  localparam int unsigned CW_W   = DATA_W + CHK_W;  // stored codeword: {check, data}

  // Which SEC-DED code a half uses.
  typedef enum logic {
    CODE_HSIAO = 1'b0,
    CODE_CRC   = 1'b1
  } code_e;

  typedef logic [R-1:0] col_t;
  typedef col_t         hmat_t [K];

  // Hsiao data columns, column j for data bit j (row sets in 1-based rows).
  localparam hmat_t HSIAO_H = '{
    8'h07,  // 0:  1 2 3
    8'h0B,  // 1:  1 2 4
    8'h13,  // 2:  1 2 5
    8'h23,  // 3:  1 2 6
    8'h43,  // 4:  1 2 7
    8'h83,  // 5:  1 2 8
    8'h1C,  // 6:  3 4 5
    8'h2C,  // 7:  3 4 6
    8'h4C,  // 8:  3 4 7
    8'h8C,  // 9:  3 4 8
    8'h34,  // 10: 3 5 6
    8'hC8,  // 11: 4 7 8
    8'h70,  // 12: 5 6 7
    8'hB0,  // 13: 5 6 8
    8'hD0,  // 14: 5 7 8
    8'hE0   // 15: 6 7 8
  };

  // x^8 mod g(x) for g(x) = x^8 + x^3 + x^2 + 1: the low eight coefficients.
  localparam col_t CRC_POLY = 8'h0D;

  // CRC data column j: x^(j+8) mod g(x), by repeated multiplication by x.
  function automatic col_t crc_column(int unsigned j);
    col_t rem;
    rem = CRC_POLY;
    for (int unsigned i = 0; i < j; i++)
      rem = rem[R-1] ? ((rem << 1) ^ CRC_POLY) : (rem << 1);
    return rem;
  endfunction

  // Column j (0..N-1) of the full H-matrix: data columns first, then identity.
  function automatic col_t code_column(code_e code, int unsigned j);
    if (j >= K)
      return col_t'(1) << (j - K);
    else if (code == CODE_HSIAO)
      return HSIAO_H[j];
    else
      return crc_column(j);
  endfunction

  // Row r (0..R-1) of the data part: which data bits feed check bit r.
  function automatic logic [K-1:0] row_mask(code_e code, int unsigned r);
    logic [K-1:0] m;
    for (int unsigned j = 0; j < K; j++)
      m[j] = code_column(code, j)[r];
    return m;
  endfunction

  // Decoder flags of one SEC-DED half.
  typedef struct packed {
    logic ce;  // a single error was found and corrected
    logic ue;  // an error was detected that cannot be corrected
  } secded_status_t;

  // Decoder flags of the interleaved word.
  typedef struct packed {
    secded_status_t even;  // half built from the even codeword bits
    secded_status_t odd;   // half built from the odd codeword bits
    logic           ce;    // at least one half corrected, neither failed
    logic           ue;    // at least one half reported an uncorrectable error
  } edac_status_t;

endpackage
