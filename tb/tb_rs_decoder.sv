// tb_rs_decoder: code words from the reference encoder with 0..16 random
// symbol errors must come out as the original 223 message symbols, with the
// number of corrected symbols reported; words with 20 errors must be flagged
// as uncorrectable. Words are sent back to back, one symbol every 4 clocks as
// in the four-lane receiver, so the ping-pong buffer is exercised and the
// decode must keep up (the overrun output must never fire).
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_rs_decoder;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_start = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_first, out_last, out_fail, overrun;
  logic [7:0] out_data;
  logic [4:0] out_nerr;
  rs_decoder dut (.*);
  localparam int NW = 24;
  byte unsigned msgs [NW][223];
  int nerrs [NW];
  int wout = 0, sidx = 0, novr = 0, nfail_seen = 0;

  always @(posedge clk) if (!rst) begin
    if (overrun) novr++;
    if (out_valid) begin
      if (nerrs[wout] <= 16)
        `CHECK(out_data == msgs[wout][sidx], $sformatf("word %0d symbol %0d", wout, sidx))
      `CHECK(out_first == (sidx == 0), "first flag")
      if (out_last) begin
        `CHECK(sidx == 222, "223 symbols")
        if (nerrs[wout] <= 16) begin
          `CHECK(!out_fail && out_nerr == 5'(nerrs[wout]), $sformatf("word %0d: fail=%0d nerr=%0d want %0d", wout, out_fail, out_nerr, nerrs[wout]))
        end else begin
          if (out_fail) nfail_seen++;
        end
        wout++;
        sidx = 0;
      end else sidx++;
    end
  end

  `WATCHDOG(200000)
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int w = 0; w < NW; w++) begin
      byte unsigned cw [255];
      bit used [255];
      foreach (msgs[w][i]) msgs[w][i] = byte'($urandom);
      rs_encode(msgs[w], cw);
      nerrs[w] = (w < 17) ? w : (w < 20) ? 16 : 20;
      foreach (used[i]) used[i] = 0;
      for (int e = 0; e < nerrs[w]; e++) begin
        int p;
        do p = $urandom_range(0, 254); while (used[p]);
        used[p] = 1;
        cw[p] ^= byte'($urandom_range(1, 255));
      end
      for (int i = 0; i < 255; i++) begin
        in_valid = 1; in_start = (i == 0); in_data = cw[i];
        @(negedge clk);
        in_valid = 0; in_start = 0;
        repeat (3) @(negedge clk);
      end
    end
    repeat (1200) @(negedge clk);
    `CHECK(wout == NW, $sformatf("words out %0d", wout))
    `CHECK(novr == 0, "no overrun")
    `CHECK(nfail_seen == NW - 20, $sformatf("uncorrectable words flagged %0d", nfail_seen))
    `TB_END
  end
endmodule
