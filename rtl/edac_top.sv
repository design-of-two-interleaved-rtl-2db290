// edac_top: the two interleaved EDACs, Hsiao-based and CRC-based, side by side.
//
// Both protect a 32-bit memory word with 16 check bits (a 48-bit codeword)
// made of two interleaved (24,16) SEC-DED codes. The write side encodes
// wr_data with each EDAC; the read side takes a codeword read back from
// memory (possibly with upset bits) for each EDAC and returns the corrected
// data with its status. The two EDACs share the write data but are otherwise
// independent, so their correction and detection behaviour can be compared
// on the same words.
//
// Interface:
//   wr_data        32-bit data to protect
//   hsiao_cw       48-bit codeword {check, data} from the Hsiao EDAC
//   crc_cw         48-bit codeword from the CRC EDAC
//   hsiao_rd_cw    48-bit Hsiao codeword read back
//   crc_rd_cw      48-bit CRC codeword read back
//   hsiao_rd_data, crc_rd_data   corrected data
//   hsiao_status,  crc_status    per-half and word-level ce / ue flags
// Timing: purely combinational, as the design specifies no registers; a
// memory controller would register these at its own read/write stages.
module edac_top
  import edac_pkg::*;
(
  input  logic [DATA_W-1:0] wr_data,
  output logic [CW_W-1:0]   hsiao_cw,
  output logic [CW_W-1:0]   crc_cw,
  input  logic [CW_W-1:0]   hsiao_rd_cw,
  input  logic [CW_W-1:0]   crc_rd_cw,
  output logic [DATA_W-1:0] hsiao_rd_data,
  output logic [DATA_W-1:0] crc_rd_data,
  output edac_status_t      hsiao_status,
  output edac_status_t      crc_status
);

  logic [CHK_W-1:0] hsiao_chk, crc_chk;

  interleaved_encoder #(.CODE(CODE_HSIAO)) u_hsiao_enc (.d(wr_data), .chk(hsiao_chk));
  interleaved_encoder #(.CODE(CODE_CRC))   u_crc_enc   (.d(wr_data), .chk(crc_chk));

  // Stored codeword: check bits above the data bits.
  assign hsiao_cw = {hsiao_chk, wr_data};
  assign crc_cw   = {crc_chk,   wr_data};

  interleaved_decoder #(.CODE(CODE_HSIAO)) u_hsiao_dec (.rx_cw(hsiao_rd_cw), .data(hsiao_rd_data), .status(hsiao_status));
  interleaved_decoder #(.CODE(CODE_CRC))   u_crc_dec   (.rx_cw(crc_rd_cw),   .data(crc_rd_data),   .status(crc_status));

endmodule
