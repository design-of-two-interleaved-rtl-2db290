// tb_interleaved_decoder: 48-bit interleaved decoder, both codes.
//
// For random data words, encodes with the reference model and applies
//   - no error: data back, no flags;
//   - all 48 single errors: corrected, ce;
//   - all 1128 double errors: corrected with ce when the two bits lie in
//     different halves (one even, one odd index, adjacent pairs included),
//     otherwise ue;
//   - all 46 three-adjacent and 45 four-adjacent bursts: ue.
// Per-half flags are checked too. One vector per clock.
module tb_interleaved_decoder;
  import edac_pkg::*;
  `include "edac_ref.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [47:0]  rx   [2];
  logic [31:0]  dout [2];
  edac_status_t st   [2];

  interleaved_decoder #(.CODE(CODE_HSIAO)) dut_h (.rx_cw(rx[0]), .data(dout[0]), .status(st[0]));
  interleaved_decoder #(.CODE(CODE_CRC))   dut_c (.rx_cw(rx[1]), .data(dout[1]), .status(st[1]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Number of flipped bits with even and with odd index.
  function automatic int n_even(logic [47:0] e);
    int n = 0;
    for (int i = 0; i < 48; i += 2) n += int'(e[i]);
    return n;
  endfunction
  function automatic int n_odd(logic [47:0] e);
    int n = 0;
    for (int i = 1; i < 48; i += 2) n += int'(e[i]);
    return n;
  endfunction

  // Errors of at most one bit per half must be corrected; a half with two
  // errors must report ue.
  task automatic apply(logic [31:0] d, logic [47:0] e);
    int ne, no;
    logic ok;
    ne = n_even(e);
    no = n_odd(e);
    for (int code = 0; code < 2; code++) rx[code] = ref_encode32(code, d) ^ e;
    @(posedge clk);
    for (int code = 0; code < 2; code++) begin
      checks++;
      if (ne <= 1 && no <= 1)
        ok = dout[code] === d && st[code].ue === 1'b0 && st[code].ce === (e != '0)
          && st[code].even.ce === (ne == 1) && st[code].odd.ce === (no == 1);
      else
        ok = st[code].ue === 1'b1 && st[code].ce === 1'b0
          && (ne != 2 || st[code].even.ue === 1'b1) && (no != 2 || st[code].odd.ue === 1'b1);
      if (!ok) begin
        failures++;
        if (failures < 10)
          $display("code %0d d=%h e=%h out=%h st=%b", code, d, e, dout[code], st[code]);
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    for (int t = 0; t < 20; t++) begin
      d = (t == 0) ? 32'h1234_5678 : $urandom;
      apply(d, '0);
      for (int i = 0; i < 48; i++) begin
        apply(d, 48'(1) << i);
        for (int j = i + 1; j < 48; j++) apply(d, (48'(1) << i) | (48'(1) << j));
      end
      for (int i = 0; i + 3 <= 48; i++) apply(d, 48'h7 << i);
      for (int i = 0; i + 4 <= 48; i++) apply(d, 48'hF << i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
