// tb_uart_tx: transmits bytes back to back and decodes the line in the
// testbench by sampling the middle of each bit; also checks that one frame
// lasts 10 bit times of 16 ticks (tick every 2 clocks: 320 clocks).
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_uart_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tick, start = 0, ready, tx;
  logic [7:0] data_in = 0;
  always #5 clk = ~clk;
  uart_baud_gen #(.ACC_W(17), .INC(1 << 16)) bg (.clk, .rst, .tick);
  uart_tx dut (.clk, .rst, .tick, .start, .data_in, .ready, .tx);
  localparam int BITCLK = 32;

  byte unsigned got [$];
  int frame_len [$];
  initial begin
    forever begin
      byte unsigned b;
      int t0;
      @(negedge tx);
      t0 = $time;
      repeat (BITCLK / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BITCLK) @(posedge clk);
        b[i] = tx;
      end
      repeat (BITCLK) @(posedge clk);
      if (tx) got.push_back(b);
      @(posedge ready);
      frame_len.push_back(($time - t0) / 10);
    end
  end

  `WATCHDOG(200000)
  initial begin
    byte unsigned sent [$];
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    `CHECK(tx == 1, "idle line high")
    for (int k = 0; k < 30; k++) begin
      byte unsigned b;
      b = byte'($urandom);
      sent.push_back(b);
      while (!ready) @(posedge clk);
      data_in <= b; start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk);
    end
    repeat (12 * BITCLK) @(posedge clk);
    `CHECK(got.size() == sent.size(), $sformatf("decoded %0d bytes", got.size()))
    for (int k = 0; k < sent.size() && k < got.size(); k++)
      `CHECK(got[k] == sent[k], $sformatf("byte %0d: %02x vs %02x", k, got[k], sent[k]))
    foreach (frame_len[k])
      `CHECK(frame_len[k] >= 10 * BITCLK - 4 && frame_len[k] <= 10 * BITCLK + 4,
             $sformatf("frame %0d lasted %0d clocks", k, frame_len[k]))
    `TB_END
  end
endmodule
