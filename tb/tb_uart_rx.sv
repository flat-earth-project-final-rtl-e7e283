// tb_uart_rx: sends 8N1 frames at 16 ticks per bit (tick every 2 clocks)
// and checks every byte, a frame with a low stop bit (discarded, framing
// error) and a short start-bit glitch (ignored).
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_uart_rx;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tick, rx = 1;
  logic [7:0] data_out;
  logic data_valid, frame_error;
  always #5 clk = ~clk;
  uart_baud_gen #(.ACC_W(17), .INC(1 << 16)) bg (.clk, .rst, .tick);
  uart_rx dut (.clk, .rst, .tick, .rx, .data_out, .data_valid, .frame_error);
  localparam int BITCLK = 32;

  byte unsigned got [$];
  int ferr = 0;
  always @(posedge clk) begin
    if (data_valid) got.push_back(data_out);
    if (frame_error) ferr++;
  end

  task automatic send(byte unsigned b, bit stop);
    rx <= 0; repeat (BITCLK) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= b[i]; repeat (BITCLK) @(posedge clk); end
    // a bad stop bit is held low just past its middle sample
    rx <= stop; repeat (stop ? BITCLK : BITCLK / 2 + 4) @(posedge clk);
    rx <= 1; repeat (BITCLK) @(posedge clk);
  endtask

  `WATCHDOG(200000)
  initial begin
    byte unsigned sent [$];
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      byte unsigned b;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : byte'($urandom);
      sent.push_back(b);
      send(b, 1);
    end
    // bad stop bit
    send(8'hA5, 0);
    repeat (BITCLK) @(posedge clk);
    // glitch: 4 clocks low
    rx <= 0; repeat (4) @(posedge clk); rx <= 1;
    repeat (20 * BITCLK) @(posedge clk);
    send(8'h3C, 1);
    sent.push_back(8'h3C);
    repeat (4 * BITCLK) @(posedge clk);
    `CHECK(got.size() == sent.size(), $sformatf("received %0d bytes, expected %0d", got.size(), sent.size()))
    for (int k = 0; k < sent.size() && k < got.size(); k++)
      `CHECK(got[k] == sent[k], $sformatf("byte %0d: %02x vs %02x", k, got[k], sent[k]))
    `CHECK(ferr == 1, $sformatf("framing errors %0d", ferr))
    `TB_END
  end
endmodule
