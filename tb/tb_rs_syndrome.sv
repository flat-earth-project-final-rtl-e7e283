// tb_rs_syndrome: a valid code word from the reference encoder must give 32
// zero syndromes; words with random errors must give the syndromes evaluated
// directly (sum of r_i beta^((112+j) i)); done must come with the 255th symbol.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_rs_syndrome;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_start = 0, done;
  logic [7:0] in_data = 0;
  logic [7:0] syn [32];
  rs_syndrome dut (.*);
  `WATCHDOG(50000)
  initial begin
    tb_init();
    repeat (2) @(negedge clk); rst = 0;
    for (int w = 0; w < 8; w++) begin
      byte unsigned msg [223];
      byte unsigned cw [255];
      int ndone;
      foreach (msg[i]) msg[i] = byte'($urandom);
      rs_encode(msg, cw);
      for (int e = 0; e < w * 3; e++) cw[$urandom_range(0, 254)] ^= byte'($urandom_range(1, 255));
      ndone = 0;
      for (int i = 0; i < 255; i++) begin
        in_valid = 1; in_start = (i == 0); in_data = cw[i];
        @(negedge clk);
        in_valid = 0; in_start = 0;
        if (done) ndone++;
        if (w % 2 == 1) @(negedge clk);
      end
      `CHECK(done || ndone == 1, "done after 255 symbols")
      for (int j = 0; j < 32; j++)
        `CHECK(syn[j] == 8'(syndrome(cw, j)), $sformatf("word %0d S%0d: %02x vs %02x", w, j, syn[j], syndrome(cw, j)))
    end
    `TB_END
  end
endmodule
