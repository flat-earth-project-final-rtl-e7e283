// tb_rs_chien_forney: from known errors the testbench forms Lambda (product
// of 1 + X_k x) and Omega (Lambda*S mod x^16) and checks the 255 error values
// streamed in reception order: the error value at each error position, zero
// elsewhere, the root count, and done on the 255th value.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_rs_chien_forney;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, out_valid, done;
  always #5 clk = ~clk;
  logic [7:0] lambda [17];
  logic [7:0] omega [16];
  logic [7:0] err_val;
  logic [8:0] nroots;
  rs_chien_forney dut (.*);
  `WATCHDOG(50000)
  initial begin
    tb_init();
    repeat (2) @(negedge clk); rst = 0;
    for (int w = 0; w < 24; w++) begin
      byte unsigned ew [255];
      int unsigned lam [17];
      int unsigned s [32];
      int nerr, idx;
      nerr = w % 17;
      foreach (ew[i]) ew[i] = 0;
      for (int k = 0; k < nerr; k++) begin
        int p;
        do p = $urandom_range(0, 254); while (ew[254 - p] != 0);
        ew[254 - p] = byte'($urandom_range(1, 255));
      end
      foreach (lam[i]) lam[i] = 0;
      lam[0] = 1;
      for (int i = 0; i < 255; i++) if (ew[i] != 0) begin
        int unsigned x;
        x = beta(254 - i);
        for (int k = 16; k > 0; k--) lam[k] = lam[k] ^ mul(lam[k-1], x);
      end
      for (int j = 0; j < 32; j++) s[j] = syndrome(ew, j);
      for (int i = 0; i < 17; i++) lambda[i] = 8'(lam[i]);
      for (int n = 0; n < 16; n++) begin
        int unsigned o;
        o = 0;
        for (int j = 0; j <= n; j++) o ^= mul(s[n - j], lam[j]);
        omega[n] = 8'(o);
      end
      start = 1; @(negedge clk); start = 0;
      idx = 0;
      while (idx < 255) begin
        @(negedge clk);
        if (out_valid) begin
          `CHECK(err_val == ew[idx], $sformatf("word %0d symbol %0d: %02x vs %02x", w, idx, err_val, ew[idx]))
          if (idx == 254) `CHECK(done, "done with last value")
          idx++;
        end
      end
      `CHECK(nroots == 9'(nerr), $sformatf("roots %0d want %0d", nroots, nerr))
    end
    `TB_END
  end
endmodule
