// tb_edac_top: end-to-end test of the Hsiao and CRC interleaved EDACs.
//
// Each step writes a data word, takes the two 48-bit codewords from the
// encoders (checked against the reference model), flips a pattern of bits in
// each as a memory upset would, feeds them back to the decoders and checks
// the corrected data and flags. Every error class the design is meant to
// handle is made to happen and counted per EDAC:
//   clean word, single error, double adjacent error, double error with one
//   even and one odd non-adjacent bit (all corrected); double error in the
//   same half, three-adjacent and four-adjacent bursts (all detected).
// A class that never occurred counts as a failure.
//
// It then measures the error-class table of the design on one word: all
// 17296 triple and all 194580 quadruple errors of the 48-bit codeword,
// classified by how many flipped bits are even and odd. The classes the
// design guarantees (two in one half and at most two in the other: detected)
// are checked; the others (three or four in one half) are only counted as
// detected, corrected or miscorrected and printed.
// One vector per clock; all parameters are at their defaults.
module tb_edac_top;
  import edac_pkg::*;
  `include "edac_ref.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0]  wr_data;
  logic [47:0]  cw    [2];
  logic [47:0]  rd_cw [2];
  logic [31:0]  rd_data [2];
  edac_status_t st    [2];

  edac_top dut (
    .wr_data      (wr_data),
    .hsiao_cw     (cw[0]),
    .crc_cw       (cw[1]),
    .hsiao_rd_cw  (rd_cw[0]),
    .crc_rd_cw    (rd_cw[1]),
    .hsiao_rd_data(rd_data[0]),
    .crc_rd_data  (rd_data[1]),
    .hsiao_status (st[0]),
    .crc_status   (st[1])
  );

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    M_CLEAN, M_SINGLE, M_DOUBLE_ADJ, M_DOUBLE_EVEN_ODD, M_DOUBLE_SAME_HALF,
    M_TRIPLE_ADJ, M_QUAD_ADJ, M_NUM
  } mech_e;
  localparam string MECH_NAME [M_NUM] = '{
    "clean", "single corrected", "double adjacent corrected",
    "double even+odd corrected", "double same half detected",
    "three adjacent detected", "four adjacent detected"
  };
  int mech_cnt [2][M_NUM];

  // Outcome of one decode against the written data.
  typedef enum int { O_CLEAN, O_CORRECTED, O_DETECTED, O_MISCORRECTED } outcome_e;

  function automatic outcome_e outcome(int code, logic [31:0] d);
    if (st[code].ue) return O_DETECTED;
    if (rd_data[code] !== d) return O_MISCORRECTED;
    return st[code].ce ? O_CORRECTED : O_CLEAN;
  endfunction

  function automatic int count_parity(logic [47:0] e, int par);
    int n = 0;
    for (int i = par; i < 48; i += 2) n += int'(e[i]);
    return n;
  endfunction

  // Write d, upset e, read back; returns nothing, leaves results on the DUT.
  task automatic cycle(logic [31:0] d, logic [47:0] e);
    wr_data = d;
    #1;
    for (int code = 0; code < 2; code++) rd_cw[code] = cw[code] ^ e;
    @(posedge clk);
  endtask

  task automatic run(logic [31:0] d, logic [47:0] e, mech_e m);
    outcome_e o;
    cycle(d, e);
    for (int code = 0; code < 2; code++) begin
      checks++;
      o = outcome(code, d);
      if (cw[code] !== ref_encode32(code, d)) begin
        failures++;
        $display("code %0d encode d=%h cw=%h expected %h", code, d, cw[code], ref_encode32(code, d));
      end else if ((m == M_CLEAN && o != O_CLEAN)
                || (m inside {M_SINGLE, M_DOUBLE_ADJ, M_DOUBLE_EVEN_ODD} && o != O_CORRECTED)
                || (m inside {M_DOUBLE_SAME_HALF, M_TRIPLE_ADJ, M_QUAD_ADJ} && o != O_DETECTED)) begin
        failures++;
        if (failures < 10) $display("code %0d %s d=%h e=%h outcome %0d", code, MECH_NAME[m], d, e, o);
      end else begin
        mech_cnt[code][m]++;
      end
    end
  endtask

  int stat3 [2][4][4];  // [code][even errors][outcome] for triples
  int stat4 [2][5][4];  // [code][even errors][outcome] for quadruples

  task automatic classify(logic [31:0] d, logic [47:0] e, int w);
    int ne;
    outcome_e o;
    cycle(d, e);
    ne = count_parity(e, 0);
    for (int code = 0; code < 2; code++) begin
      o = outcome(code, d);
      if (w == 3) stat3[code][ne][o]++;
      else        stat4[code][ne][o]++;
      // Two errors in one half and at most two in the other: always detected.
      if (ne == 2 || w - ne == 2) begin
        checks++;
        if (o != O_DETECTED) begin
          failures++;
          if (failures < 10) $display("code %0d weight %0d e=%h not detected", code, w, e);
        end
      end
    end
  endtask

  initial begin
    automatic logic [31:0] d;
    automatic logic [47:0] one = 48'h1;
    for (int t = 0; t < 30; t++) begin
      d = (t == 0) ? 32'h0000_000F : (t == 1) ? 32'h1234_5678 : (t == 2) ? 32'h1234_ABCD : $urandom;
      run(d, '0, M_CLEAN);
      for (int i = 0; i < 48; i++) run(d, one << i, M_SINGLE);
      for (int i = 0; i < 47; i++) run(d, 48'h3 << i, M_DOUBLE_ADJ);
      for (int i = 0; i < 20; i++) begin
        int a, b;
        a = 2 * $urandom_range(0, 23);
        b = 2 * $urandom_range(0, 23) + 1;
        if (a == b + 1 || b == a + 1) b = (b + 4) % 48;
        run(d, (one << a) | (one << b), M_DOUBLE_EVEN_ODD);
        b = (a + 2 * $urandom_range(1, 23)) % 48;
        run(d, (one << a) | (one << b), M_DOUBLE_SAME_HALF);
        run(d, (one << (a + 1)) | (one << ((a + 1 + 2 * $urandom_range(1, 23)) % 48)), M_DOUBLE_SAME_HALF);
      end
      for (int i = 0; i < 46; i++) run(d, 48'h7 << i, M_TRIPLE_ADJ);
      for (int i = 0; i < 45; i++) run(d, 48'hF << i, M_QUAD_ADJ);
    end
    for (int code = 0; code < 2; code++)
      for (int m = 0; m < M_NUM; m++) begin
        checks++;
        $display("%s EDAC: %-28s %0d", code != 0 ? "CRC  " : "Hsiao", MECH_NAME[m], mech_cnt[code][m]);
        if (mech_cnt[code][m] == 0) begin
          failures++;
          $display("  never happened");
        end
      end

    // Error-class table on one word.
    d = 32'h1234_5678;
    for (int i = 0; i < 48; i++)
      for (int j = i + 1; j < 48; j++)
        for (int k = j + 1; k < 48; k++)
          classify(d, (one << i) | (one << j) | (one << k), 3);
    for (int i = 0; i < 48; i++)
      for (int j = i + 1; j < 48; j++)
        for (int k = j + 1; k < 48; k++)
          for (int l = k + 1; l < 48; l++)
            classify(d, (one << i) | (one << j) | (one << k) | (one << l), 4);
    for (int code = 0; code < 2; code++) begin
      $display("%s EDAC, word %h: flipped bits (even+odd): corrected / detected / miscorrected",
               code != 0 ? "CRC" : "Hsiao", d);
      for (int ne = 0; ne <= 3; ne++)
        $display("  %0d+%0d: %0d / %0d / %0d", ne, 3 - ne,
                 stat3[code][ne][O_CORRECTED], stat3[code][ne][O_DETECTED],
                 stat3[code][ne][O_MISCORRECTED] + stat3[code][ne][O_CLEAN]);
      for (int ne = 0; ne <= 4; ne++)
        $display("  %0d+%0d: %0d / %0d / %0d", ne, 4 - ne,
                 stat4[code][ne][O_CORRECTED], stat4[code][ne][O_DETECTED],
                 stat4[code][ne][O_MISCORRECTED] + stat4[code][ne][O_CLEAN]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
