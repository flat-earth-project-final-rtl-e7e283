// tb_viterbi_decoder: encodes 6000 random bits with the K=7 code
// (generators 1111001, 1011011), maps them to soft values +-100 with noise of
// up to +-70 and inverts one symbol in 40, and checks the decoded stream bit
// for bit (output bit k is input bit k-59). Pairs arrive with gaps and back
// to back; the metric normalisation must stall the input at least once, and
// the decoded rate must be one bit per pair.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_viterbi_decoder;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_bit, norm_stall, tb_overflow;
  logic signed [7:0] in_i = 0, in_q = 0;
  viterbi_decoder dut (.*);
  localparam int N = 6000;
  bit u [N];
  int nout = 0, nnorm = 0, nerr = 0, novf = 0;
  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      if (nout - 59 >= 60 && nout - 59 < N) begin
        `CHECK(out_bit == u[nout - 59], $sformatf("bit %0d", nout - 59))
      end
      nout++;
    end
    if (norm_stall) nnorm++;
    if (tb_overflow) novf++;
  end
  `WATCHDOG(100000)
  initial begin
    bit [5:0] h;
    h = 0;
    for (int t = 0; t < N; t++) u[t] = $urandom;
    repeat (3) @(posedge clk); rst <= 0;
    @(negedge clk);
    for (int t = 0; t < N; t++) begin
      bit [1:0] c;
      int si, sq;
      c = conv(u[t], h);
      h = {u[t], h[5:1]};
      si = (c[1] ? 100 : -100) + int'($urandom_range(0, 140)) - 70;
      sq = (c[0] ? 100 : -100) + int'($urandom_range(0, 140)) - 70;
      if (t % 40 == 7) si = -si;
      in_valid = 1; in_i = sat8(si); in_q = sat8(sq);
      while (!in_ready) @(negedge clk);  // ready is stable between edges
      @(negedge clk);                    // accepted at the posedge in between
      in_valid = 0;
      if (t % 3 == 0) @(negedge clk);
    end
    repeat (200) @(posedge clk);
    `CHECK(nout == ((N - 1 - 60) / 30 + 1) * 30, $sformatf("bits out %0d", nout))
    `CHECK(nnorm > 0, $sformatf("normalisations %0d", nnorm))
    `CHECK(novf == 0, "no output overflow")
    $display("normalisation stalls: %0d", nnorm);
    `TB_END
  end
endmodule
