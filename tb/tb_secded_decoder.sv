// tb_secded_decoder: SEC-DED decoding of one (24,16) half, both codes.
//
// The syndrome input is driven from the reference columns, so the decoder is
// tested on its own. For random data words it applies: no error, each of the
// 24 single errors, each of the 276 double errors. Expected: data unchanged
// and no flag; single errors corrected with ce; double errors flagged ue
// with ce low. It also applies every one of the 2024 triple errors to one
// word and reports how many each code detects rather than miscorrects (a
// property of the code, printed for information, not checked).
module tb_secded_decoder;
  import edac_pkg::*;
  `include "edac_ref.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0]    rx_d [2];
  logic [7:0]     syn  [2];
  logic [15:0]    dout [2];
  secded_status_t st   [2];

  secded_decoder #(.CODE(CODE_HSIAO)) dut_h (.rx_data(rx_d[0]), .syn(syn[0]), .data(dout[0]), .status(st[0]));
  secded_decoder #(.CODE(CODE_CRC))   dut_c (.rx_data(rx_d[1]), .syn(syn[1]), .data(dout[1]), .status(st[1]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 none, 1 single, 2 double (checked), 3 triple (counted only)
  task automatic apply(logic [15:0] d, logic [23:0] e, int kind, ref int det3 [2]);
    for (int code = 0; code < 2; code++) begin
      rx_d[code] = d ^ e[15:0];
      syn[code]  = '0;
      for (int j = 0; j < 24; j++) if (e[j]) syn[code] ^= ref_col(code, j);
    end
    @(posedge clk);
    for (int code = 0; code < 2; code++) begin
      if (kind == 3) begin
        if (st[code].ue) det3[code]++;
      end else begin
        checks++;
        if ((kind <= 1 && (dout[code] !== d || st[code].ue !== 1'b0 || st[code].ce !== (kind == 1)))
         || (kind == 2 && (st[code].ue !== 1'b1 || st[code].ce !== 1'b0))) begin
          failures++;
          if (failures < 10)
            $display("code %0d kind %0d d=%h e=%h out=%h ce=%b ue=%b", code, kind, d, e, dout[code], st[code].ce, st[code].ue);
        end
      end
    end
  endtask

  initial begin
    int det3 [2];
    logic [15:0] d;
    det3 = '{0, 0};
    for (int t = 0; t < 40; t++) begin
      d = 16'($urandom);
      apply(d, '0, 0, det3);
      for (int i = 0; i < 24; i++) begin
        apply(d, 24'(1) << i, 1, det3);
        for (int j = i + 1; j < 24; j++)
          apply(d, (24'(1) << i) | (24'(1) << j), 2, det3);
      end
    end
    d = 16'($urandom);
    for (int i = 0; i < 24; i++)
      for (int j = i + 1; j < 24; j++)
        for (int k = j + 1; k < 24; k++)
          apply(d, (24'(1) << i) | (24'(1) << j) | (24'(1) << k), 3, det3);
    $display("single (24,16) code, triple errors detected: Hsiao %0d/2024, CRC %0d/2024", det3[0], det3[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
