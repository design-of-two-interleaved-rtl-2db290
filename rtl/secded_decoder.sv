// secded_decoder: single-error correction and double-error detection for one
// (24,16) half.
//
// The syndrome is compared with each of the 24 H-matrix columns. A match
// marks the single flipped bit: a data bit is inverted back, a check-bit
// error needs no data change; either way ce is raised. A non-zero syndrome
// that matches no column cannot come from one error and raises ue; the data
// is then passed on unchanged. Both codes have minimum distance 4, so every
// double error lands here. The same column-matching decoder serves the Hsiao
// and the CRC code (the odd/even-weight shortcut only works for Hsiao).
// The matching scheme and the ce/ue flags are this implementation's choice;
// the architecture only calls for a decoder per half. An immediate assertion
// checks that no syndrome matches more than one column.
//
// Parameter CODE selects the matrix.
// Interface: rx_data (16), syn (8) in; data (16), status {ce, ue} out.
// Timing: purely combinational.
module secded_decoder
  import edac_pkg::*;
#(
  parameter code_e CODE = CODE_HSIAO
) (
  input  logic [K-1:0]   rx_data,
  input  logic [R-1:0]   syn,
  output logic [K-1:0]   data,
  output secded_status_t status
);

  logic [N-1:0] hit;  // hit[j]: syndrome equals column j

  always_comb begin
    for (int unsigned j = 0; j < N; j++)
      hit[j] = (syn == code_column(CODE, j));
    data      = rx_data ^ hit[K-1:0];
    status.ce = |hit;
    status.ue = (syn != '0) && !(|hit);
  end

  // The columns of H are distinct, so a syndrome can match at most one.
  always_comb begin
    assert ($countones(hit) <= 1)
      else $error("syndrome %h matches %0d columns", syn, $countones(hit));
  end

endmodule
