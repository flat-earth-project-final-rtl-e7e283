// tb_descrambler: scrambles three CVCDUs of 1020 random bytes with the
// reference noise sequence (restarted every 255 bytes) and checks that the
// descrambler restores every byte; between CVCDUs a few stray bytes are sent
// to check that new_cvcdu restarts the sequence.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_descrambler;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, new_cvcdu = 0, out_valid, out_first;
  logic [7:0] in_data = 0, out_data;
  descrambler dut (.*);
  `WATCHDOG(20000)
  initial begin
    byte unsigned ref_seq [255];
    for (int k = 0; k < 255; k++) ref_seq[k] = pn_byte(k);
    repeat (2) @(negedge clk); rst = 0;
    for (int c = 0; c < 3; c++) begin
      for (int k = 0; k < 1020; k++) begin
        byte unsigned d;
        d = byte'($urandom);
        in_valid = 1; new_cvcdu = (k == 0); in_data = d ^ ref_seq[k % 255];
        @(negedge clk);
        in_valid = 0; new_cvcdu = 0;
        `CHECK(out_valid && out_data == d && out_first == (k == 0), $sformatf("cvcdu %0d byte %0d", c, k))
        if (k % 11 == 0) @(negedge clk);
      end
      repeat (c + 1) begin
        in_valid = 1; in_data = 8'h55; @(negedge clk); in_valid = 0;
      end
    end
    `TB_END
  end
endmodule
