// tb_pn_lfsr: the byte sequence after restart must begin FF 48 0E C0 9A 0D
// 70 BC (the published randomiser sequence) and match the bit recurrence of
// h(x) for 600 bytes, i.e. repeat with period 255.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_pn_lfsr;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, restart = 0, advance = 0;
  logic [7:0] pn;
  always #5 clk = ~clk;
  pn_lfsr dut (.*);
  `WATCHDOG(5000)
  initial begin
    byte unsigned known [8] = '{8'hFF, 8'h48, 8'h0E, 8'hC0, 8'h9A, 8'h0D, 8'h70, 8'hBC};
    byte unsigned ref_seq [255];
    for (int k = 0; k < 255; k++) ref_seq[k] = pn_byte(k);
    repeat (2) @(negedge clk); rst = 0;
    for (int k = 0; k < 8; k++) `CHECK(ref_seq[k] == known[k], "reference model")
    for (int k = 0; k < 600; k++) begin
      `CHECK(pn == ref_seq[k % 255], $sformatf("byte %0d: %02x vs %02x", k, pn, ref_seq[k % 255]))
      advance = 1; @(negedge clk); advance = 0;
      if (k % 7 == 0) @(negedge clk);
    end
    restart = 1; @(negedge clk); restart = 0;
    `CHECK(pn == 8'hFF, "restart")
    restart = 1; advance = 1; @(negedge clk); restart = 0; advance = 0;
    `CHECK(pn == 8'h48, "restart with advance")
    `TB_END
  end
endmodule
