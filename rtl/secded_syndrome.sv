// secded_syndrome: syndrome of one received (24,16) word.
//
// The data part of the received word is encoded again with the same encoder
// as on the write side, and the result is XORed with the received check bits.
// A zero syndrome means no error was seen; otherwise the syndrome equals the
// XOR of the H-matrix columns of the flipped bits. Re-encoding with the
// write-side encoder is the usual way to form it; the architecture names a
// syndrome block per half without fixing its insides.
//
// Parameter CODE selects the Hsiao or the CRC encoder.
// Interface: rx_data (16), rx_chk (8) in; syn (8) out. Purely combinational.
module secded_syndrome
  import edac_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO
) (
  input  logic [K-1:0] rx_data,
  input  logic [R-1:0] rx_chk,
  output logic [R-1:0] syn
);

  logic [R-1:0] recomputed;

  if (CODE == CODE_HSIAO) begin : g_hsiao
    hsiao_encoder u_enc (.d(rx_data), .c(recomputed));
  end else begin : g_crc
    crc_encoder u_enc (.d(rx_data), .c(recomputed));
  end

  assign syn = recomputed ^ rx_chk;

endmodule
