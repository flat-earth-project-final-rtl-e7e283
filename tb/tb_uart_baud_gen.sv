// tb_uart_baud_gen: checks the tick rate of the fractional baud generator at
// its default setting: over 2^17 clocks exactly INC ticks, never two ticks in
// a row, and spacing of 54 or 55 clocks (2^17/2416 = 54.25).
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_uart_baud_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tick;
  always #5 clk = ~clk;
  uart_baud_gen dut (.clk, .rst, .tick);
  `WATCHDOG(300000)
  initial begin
    int n, last, gap;
    repeat (3) @(posedge clk);
    rst <= 0;
    n = 0; last = -1;
    for (int c = 0; c < (1 << 17); c++) begin
      @(posedge clk);
      if (tick) begin
        if (last >= 0) begin
          gap = c - last;
          `CHECK(gap == 54 || gap == 55, $sformatf("tick spacing %0d", gap))
        end
        last = c;
        n++;
      end
    end
    `CHECK(n >= 2415 && n <= 2416, $sformatf("ticks in 2^17 clocks: %0d", n))
    `TB_END
  end
endmodule
