// tb_hsiao_encoder: exhaustive check of the (24,16) Hsiao encoder.
//
// First checks that the H-matrix in edac_pkg obeys the Hsiao rules: every
// data column has weight 3 (odd, and the smallest odd weight that offers 16
// distinct columns on 8 rows), all 24 columns are distinct, and every row of
// the data part holds six ones. Then applies all 65536 data words, one per
// clock, and compares the check bits with the reference model.
module tb_hsiao_encoder;
  import edac_pkg::*;
  `include "edac_ref.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] d;
  logic [7:0]  c;

  hsiao_encoder dut (.d(d), .c(c));

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Rule 1: odd (here 3) column weight; columns distinct and non-zero.
    for (int j = 0; j < N; j++) begin
      checks++;
      if (j < K && $countones(code_column(CODE_HSIAO, j)) != 3) begin
        failures++; $display("column %0d weight %0d", j, $countones(code_column(CODE_HSIAO, j)));
      end
      for (int i = 0; i < j; i++) begin
        checks++;
        if (code_column(CODE_HSIAO, i) == code_column(CODE_HSIAO, j)) begin
          failures++; $display("columns %0d and %0d equal", i, j);
        end
      end
    end
    // Rules 2 and 3: 48 ones in total, six in every row.
    for (int r = 0; r < R; r++) begin
      checks++;
      if ($countones(row_mask(CODE_HSIAO, r)) != 6) begin
        failures++; $display("row %0d weight %0d", r, $countones(row_mask(CODE_HSIAO, r)));
      end
    end
    // Exhaustive encoding.
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      @(posedge clk);
      checks++;
      if (c !== ref_hsiao_chk(d)) begin
        failures++;
        if (failures < 10) $display("d=%h c=%h expected %h", d, c, ref_hsiao_chk(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
