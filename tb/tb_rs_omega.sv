// tb_rs_omega: random syndromes and locator coefficients; each omega_n must
// equal the XOR of S_i * lambda_j over i + j = n, computed with log tables.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_rs_omega;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] syn [32];
  logic [7:0] lambda [17];
  logic [7:0] omega [16];
  rs_omega dut (.*);
  `WATCHDOG(100)
  initial begin
    tb_init();
    for (int w = 0; w < 200; w++) begin
      foreach (syn[i]) syn[i] = 8'($urandom);
      foreach (lambda[i]) lambda[i] = (i == 0) ? 8'h01 : 8'($urandom);
      #1;
      for (int n = 0; n < 16; n++) begin
        int unsigned o;
        o = 0;
        for (int j = 0; j <= n; j++) o ^= mul(syn[n - j], lambda[j]);
        `CHECK(omega[n] == 8'(o), $sformatf("omega%0d", n))
      end
    end
    `TB_END
  end
endmodule
