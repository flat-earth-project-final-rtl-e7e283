// tb_viterbi_bmu: compares the four branch metrics with squared distances
// computed in integers for every pair on a grid plus random pairs.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_viterbi_bmu;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic signed [7:0] in_i, in_q;
  logic [16:0] bm [4];
  viterbi_bmu dut (.*);
  `WATCHDOG(100)
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int a, b;
      a = (n < 1089) ? (n % 33) * 8 - 128 : $urandom_range(0, 255) - 128;
      b = (n < 1089) ? (n / 33) * 8 - 128 : $urandom_range(0, 255) - 128;
      if (a > 127) a = 127;
      if (b > 127) b = 127;
      in_i = 8'(a); in_q = 8'(b);
      #1;
      for (int e = 0; e < 4; e++) begin
        int ei, eq, want;
        ei = e[1] ? 255 : 0; eq = e[0] ? 255 : 0;
        want = (a + 128 - ei) ** 2 + (b + 128 - eq) ** 2;
        `CHECK(bm[e] == 17'(want), $sformatf("bm[%0d] for %0d,%0d: %0d vs %0d", e, a, b, bm[e], want))
      end
    end
    `TB_END
  end
endmodule
