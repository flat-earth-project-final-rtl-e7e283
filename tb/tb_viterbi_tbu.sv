// tb_viterbi_tbu: feeds decision columns of a known path in which every
// state's decision equals the dropped bit of the true previous state, so
// tracing back from any state joins the true path within six steps. Output
// bit k must then be input bit k-59 (the first pointer's first block covers
// steps -59..-30), every bit must arrive, and the two pointers must deliver
// B=30 bits per 30 steps without output overflow. Steps come with random
// gaps and also back to back.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_viterbi_tbu;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic step = 0, out_valid, out_bit, overflow;
  logic [63:0] dec = 0;
  viterbi_tbu dut (.*);
  localparam int NSTEP = 1200;
  bit u [NSTEP];
  int nout = 0, novf = 0;
  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      if (nout - 59 >= 60 && nout - 59 < NSTEP)
        `CHECK(out_bit == u[nout - 59], $sformatf("bit %0d", nout - 59))
      nout++;
    end
    if (overflow) novf++;
  end
  `WATCHDOG(50000)
  initial begin
    for (int t = 0; t < NSTEP; t++) u[t] = $urandom;
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < NSTEP; t++) begin
      @(negedge clk);
      step = 1;
      dec  = (t >= 6) ? {64{u[t-6]}} : '0;
      @(negedge clk);
      step = 0;
      if (t < NSTEP / 2) repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (100) @(posedge clk);
    // emissions happen at steps 60, 90, ... below NSTEP
    `CHECK(nout == ((NSTEP - 1 - 60) / 30 + 1) * 30, $sformatf("bits out %0d", nout))
    `CHECK(novf == 0, "no overflow")
    `TB_END
  end
endmodule
