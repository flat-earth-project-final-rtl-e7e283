// tb_rs_berlekamp_massey: for 1..16 random errors at random positions the
// locator found from the syndromes must equal prod (1 + X_k x), X_k =
// beta^(position), with deg = number of errors; done must come 64 clocks
// after start.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_rs_berlekamp_massey;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, done;
  always #5 clk = ~clk;
  logic [7:0] syn [32];
  logic [7:0] lambda [17];
  logic [5:0] deg;
  rs_berlekamp_massey dut (.*);
  `WATCHDOG(50000)
  initial begin
    tb_init();
    repeat (2) @(negedge clk); rst = 0;
    for (int w = 0; w < 40; w++) begin
      byte unsigned ew [255];
      int pos [$];
      int unsigned lam [17];
      int nerr, lat;
      nerr = (w % 16) + 1;
      pos.delete();
      foreach (ew[i]) ew[i] = 0;
      while (pos.size() < nerr) begin
        int p;
        p = $urandom_range(0, 254);
        if (ew[254 - p] == 0) begin
          ew[254 - p] = byte'($urandom_range(1, 255));
          pos.push_back(p);
        end
      end
      for (int j = 0; j < 32; j++) syn[j] = 8'(syndrome(ew, j));
      foreach (lam[i]) lam[i] = 0;
      lam[0] = 1;
      foreach (pos[k]) begin
        int unsigned x;
        x = beta(pos[k]);
        for (int i = 16; i > 0; i--) lam[i] = lam[i] ^ mul(lam[i-1], x);
      end
      start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      `CHECK(lat == 65, $sformatf("latency %0d", lat))
      `CHECK(deg == 6'(nerr), $sformatf("word %0d: deg %0d, want %0d", w, deg, nerr))
      for (int i = 0; i < 17; i++)
        `CHECK(lambda[i] == 8'(lam[i]), $sformatf("word %0d lambda%0d", w, i))
    end
    `TB_END
  end
endmodule
