// tb_rs_deinterleaver: byte n of a CVCDU must leave on lane n mod 4, with
// out_start on the first four bytes; in_first realigns the counter.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_rs_deinterleaver;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, out_start;
  logic [7:0] in_data = 0, out_data;
  logic [3:0] out_valid;
  rs_deinterleaver dut (.*);
  `WATCHDOG(20000)
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int c = 0; c < 3; c++) begin
      for (int n = 0; n < 1020 - 3 * c; n++) begin
        byte unsigned d;
        d = byte'($urandom);
        in_valid = 1; in_first = (n == 0); in_data = d;
        @(negedge clk);
        in_valid = 0; in_first = 0;
        `CHECK(out_valid == 4'(1 << (n % 4)) && out_data == d && out_start == (n < 4),
               $sformatf("cvcdu %0d byte %0d", c, n))
      end
    end
    `TB_END
  end
endmodule
