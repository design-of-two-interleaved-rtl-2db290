// tb_crc_encoder: exhaustive check of the parallel zero-seed CRC-8 encoder.
//
// Applies all 65536 data words, one per clock, and compares the check bits
// with a bit-serial CRC shift register (seed 0, g(x) = x^8 + x^3 + x^2 + 1).
// Also checks the properties the design relies on: row weights of at most
// seven, and a 24-bit code of minimum distance 4 (all single-error
// syndromes distinct and non-zero, no double-error syndrome equal to zero or
// to a single-error syndrome).
module tb_crc_encoder;
  import edac_pkg::*;
  `include "edac_ref.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] d;
  logic [7:0]  c;

  crc_encoder dut (.d(d), .c(c));

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < R; r++) begin
      checks++;
      if ($countones(row_mask(CODE_CRC, r)) > 7) begin
        failures++; $display("row %0d weight %0d", r, $countones(row_mask(CODE_CRC, r)));
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (ref_col(1, i) == 8'h00) begin failures++; $display("zero column %0d", i); end
      for (int j = i + 1; j < N; j++) begin
        checks++;
        if (ref_col(1, i) == ref_col(1, j)) begin failures++; $display("columns %0d %0d equal", i, j); end
        for (int k = 0; k < N; k++) begin
          if ((ref_col(1, i) ^ ref_col(1, j)) == ref_col(1, k)) begin
            failures++; $display("double %0d,%0d aliases single %0d", i, j, k);
          end
        end
      end
    end
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      @(posedge clk);
      checks++;
      if (c !== ref_crc_chk(d)) begin
        failures++;
        if (failures < 10) $display("d=%h c=%h expected %h", d, c, ref_crc_chk(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
