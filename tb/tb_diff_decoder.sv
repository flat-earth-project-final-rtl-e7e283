// tb_diff_decoder: differentially encodes random I and Q bit streams
// separately (d[n] = c[n] ^ d[n-1], starting from 0), sends them as noisy soft
// values and checks the sign of every decoded value against c[n].
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_diff_decoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_q = 0, out_valid, out_q;
  logic signed [7:0] in_data = 0, out_data;
  diff_decoder dut (.*);
  `WATCHDOG(20000)
  initial begin
    bit dprev [2];
    dprev[0] = 0; dprev[1] = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      bit c, d, ch;
      ch = n % 2;
      c = $urandom;
      d = c ^ dprev[ch];
      dprev[ch] = d;
      in_valid <= 1; in_q <= ch;
      in_data <= d ? 8'(40 + $urandom_range(0, 80)) : -8'(40 + $urandom_range(0, 80));
      @(posedge clk);
      in_valid <= 0;
      #1;
      `CHECK(out_valid && out_q == ch, "valid/channel")
      `CHECK((out_data > 0) == c, $sformatf("symbol %0d", n))
    end
    `TB_END
  end
endmodule
