// tb_interleaved_encoder: 32-bit interleaved encoder, both codes.
//
// Compares chk with the reference interleaving model for corner
// words (all zeros, all ones, single ones at every position, alternating
// patterns) and for random words, one vector per clock.
module tb_interleaved_encoder;
  import edac_pkg::*;
  `include "edac_ref.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] d;
  logic [15:0] chk [2];

  interleaved_encoder #(.CODE(CODE_HSIAO)) dut_h (.d(d), .chk(chk[0]));
  interleaved_encoder #(.CODE(CODE_CRC))   dut_c (.d(d), .chk(chk[1]));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] v);
    logic [47:0] exp_cw;
    d = v;
    @(posedge clk);
    for (int code = 0; code < 2; code++) begin
      exp_cw = ref_encode32(code, v);
      checks++;
      if (chk[code] !== exp_cw[47:32]) begin
        failures++;
        if (failures < 10) $display("code %0d d=%h chk=%h expected %h", code, v, chk[code], exp_cw[47:32]);
      end
    end
  endtask

  initial begin
    apply(32'h0000_0000);
    apply(32'hFFFF_FFFF);
    apply(32'h5555_5555);
    apply(32'hAAAA_AAAA);
    apply(32'h0000_000F);
    apply(32'h1234_5678);
    apply(32'h1234_ABCD);
    for (int i = 0; i < 32; i++) apply(32'(1) << i);
    for (int t = 0; t < 20000; t++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
