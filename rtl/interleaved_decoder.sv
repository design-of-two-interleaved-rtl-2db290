// interleaved_decoder: corrects a 48-bit interleaved codeword back to 32 data
// bits.
//
// The received codeword rx_cw = {check, data} is split into its even-indexed
// and odd-indexed bits, giving two (24,16) words. Each goes through its own
// syndrome generator and SEC-DED decoder, and the two corrected 16-bit halves
// are interleaved back into the 32-bit data word. One error per half is
// corrected, so the word survives a single error, any two adjacent errors, and
// any pair with one error on an even and one on an odd bit. Two errors in the
// same half are flagged as uncorrectable; so are three or four adjacent
// errors, since one half then holds exactly two of them.
//
// The split into even and odd halves mirrors the encoder; the word-level
// flags are this implementation's choice.
// status.ce: some half corrected an error and no half failed.
// status.ue: some half found an uncorrectable error; data is then unreliable.
//
// Parameter CODE selects Hsiao or CRC for both halves; it must match the
// encoder that wrote the word.
// Interface: rx_cw (48) in; data (32), status out. Purely combinational.
module interleaved_decoder
  import edac_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO
) (
  input  logic [CW_W-1:0]   rx_cw,
  output logic [DATA_W-1:0] data,
  output edac_status_t      status
);

  logic [K-1:0] rx_d_even, rx_d_odd;
  logic [R-1:0] rx_c_even, rx_c_odd;
  logic [R-1:0] syn_even, syn_odd;
  logic [K-1:0] d_even, d_odd;
  secded_status_t st_even, st_odd;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      rx_d_even[i] = rx_cw[2*i];
      rx_d_odd[i]  = rx_cw[2*i+1];
    end
    for (int unsigned k = 0; k < R; k++) begin
      rx_c_even[k] = rx_cw[DATA_W+2*k];
      rx_c_odd[k]  = rx_cw[DATA_W+2*k+1];
    end
  end

  secded_syndrome #(.CODE(CODE)) u_syn_even (.rx_data(rx_d_even), .rx_chk(rx_c_even), .syn(syn_even));
  secded_syndrome #(.CODE(CODE)) u_syn_odd  (.rx_data(rx_d_odd),  .rx_chk(rx_c_odd),  .syn(syn_odd));

  secded_decoder #(.CODE(CODE)) u_dec_even (.rx_data(rx_d_even), .syn(syn_even), .data(d_even), .status(st_even));
  secded_decoder #(.CODE(CODE)) u_dec_odd  (.rx_data(rx_d_odd),  .syn(syn_odd),  .data(d_odd),  .status(st_odd));

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      data[2*i]   = d_even[i];
      data[2*i+1] = d_odd[i];
    end
    status.even = st_even;
    status.odd  = st_odd;
    status.ue   = st_even.ue | st_odd.ue;
    status.ce   = (st_even.ce | st_odd.ce) & ~status.ue;
  end

endmodule
