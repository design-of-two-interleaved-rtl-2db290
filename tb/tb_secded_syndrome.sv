// tb_secded_syndrome: syndrome generator for both codes.
//
// For random data words, builds the reference 24-bit word, flips none, one
// or two bits, and expects the syndrome to be the XOR of the reference
// columns of the flipped bits (zero when nothing was flipped). One instance
// per code; one vector per clock.
module tb_secded_syndrome;
  import edac_pkg::*;
  `include "edac_ref.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] rx_d [2];
  logic [7:0]  rx_c [2];
  logic [7:0]  syn  [2];

  secded_syndrome #(.CODE(CODE_HSIAO)) dut_h (.rx_data(rx_d[0]), .rx_chk(rx_c[0]), .syn(syn[0]));
  secded_syndrome #(.CODE(CODE_CRC))   dut_c (.rx_data(rx_d[1]), .rx_chk(rx_c[1]), .syn(syn[1]));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] w [2];
    logic [23:0] e;
    logic [7:0]  exp_s [2];
    int          a, b;
    for (int t = 0; t < 20000; t++) begin
      logic [15:0] d;
      d = 16'($urandom);
      a = $urandom_range(0, 23);
      b = $urandom_range(0, 23);
      e = '0;
      if (t % 3 >= 1) e[a] = 1'b1;
      if (t % 3 == 2) e[b] = ~e[b];
      for (int code = 0; code < 2; code++) begin
        w[code] = {ref_chk(code, d), d} ^ e;
        rx_d[code] = w[code][15:0];
        rx_c[code] = w[code][23:16];
        exp_s[code] = '0;
        for (int j = 0; j < 24; j++) if (e[j]) exp_s[code] ^= ref_col(code, j);
      end
      @(posedge clk);
      for (int code = 0; code < 2; code++) begin
        checks++;
        if (syn[code] !== exp_s[code]) begin
          failures++;
          if (failures < 10) $display("code %0d d=%h e=%h syn=%h expected %h", code, d, e, syn[code], exp_s[code]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
