// edac_ref.svh: reference model of the interleaved EDAC for the testbenches.
//
// Written independently of the RTL: the Hsiao check bits come from the row
// masks of its H-matrix typed out by row (row r lists the data bits feeding
// check bit r), the CRC check bits from a bit-serial shift register (seed 0,
// g(x) = x^8 + x^3 + x^2 + 1, message bit 15 first), and the interleaving
// from the codeword layout cw = {check, data}, even bits to one code and
// odd bits to the other. Code 0 is Hsiao, code 1 is CRC.

localparam logic [15:0] REF_HSIAO_ROWS [8] = '{
  16'h003F, 16'h003F, 16'h07C1, 16'h0BC2, 16'h7444, 16'hB488, 16'hD910, 16'hEA20
};

function automatic logic [7:0] ref_hsiao_chk(logic [15:0] d);
  logic [7:0] c;
  for (int r = 0; r < 8; r++) c[r] = ^(d & REF_HSIAO_ROWS[r]);
  return c;
endfunction

function automatic logic [7:0] ref_crc_chk(logic [15:0] d);
  logic [7:0] crc;
  logic       fb;
  crc = 8'h00;
  for (int i = 15; i >= 0; i--) begin
    fb  = crc[7] ^ d[i];
    crc = {crc[6:0], 1'b0};
    if (fb) crc = crc ^ 8'h0D;
  end
  return crc;
endfunction

function automatic logic [7:0] ref_chk(int code, logic [15:0] d);
  return (code == 0) ? ref_hsiao_chk(d) : ref_crc_chk(d);
endfunction

// Column j of the 24-bit code: data columns by linearity, then the identity.
function automatic logic [7:0] ref_col(int code, int j);
  if (j < 16) return ref_chk(code, 16'(1) << j);
  return 8'(1) << (j - 16);
endfunction

function automatic logic [47:0] ref_encode32(int code, logic [31:0] d);
  logic [15:0] de, dodd;
  logic [7:0]  ce, co;
  logic [15:0] chk;
  for (int i = 0; i < 16; i++) begin
    de[i]   = d[2*i];
    dodd[i] = d[2*i+1];
  end
  ce = ref_chk(code, de);
  co = ref_chk(code, dodd);
  for (int k = 0; k < 8; k++) begin
    chk[2*k]   = ce[k];
    chk[2*k+1] = co[k];
  end
  return {chk, d};
endfunction
