// tb_forney_deinterleaver: a behavioural Forney interleaver (branch b delays
// b*M symbols, 36 branches) feeds the deinterleaver with M=2. After the total
// delay of 35*M*36 symbols every output must equal the input that many
// symbols earlier, with out_branch equal to its index mod 36. in_sof every 72
// symbols keeps the commutators aligned.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_forney_deinterleaver;
  int checks = 0, failures = 0;
  localparam int NB = 36, M = 2, TD = (NB - 1) * M * NB;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_sof = 0, out_valid;
  logic signed [7:0] in_data = 0, out_data;
  logic [5:0] out_branch;
  forney_deinterleaver #(.BRANCHES(NB), .M(M)) dut (.*);

  `WATCHDOG(100000)
  initial begin
    byte signed src [$];
    byte signed line [NB][$];
    int nsym = TD + 3000;
    for (int b = 0; b < NB; b++) for (int k = 0; k < b * M; k++) line[b].push_back(0);
    repeat (3) @(posedge clk); rst <= 0;
    for (int t = 0; t < nsym; t++) begin
      byte signed x, y;
      int b;
      b = t % NB;
      x = byte'($urandom);
      src.push_back(x);
      line[b].push_back(x);
      y = line[b].pop_front();
      in_valid <= 1; in_sof <= (t % 72 == 0); in_data <= y;
      @(posedge clk);
      in_valid <= 0; in_sof <= 0;
      #1;
      `CHECK(out_valid, "valid")
      `CHECK(out_branch == 6'(b), "branch")
      if (t >= TD) `CHECK(out_data == src[t - TD], $sformatf("symbol %0d", t))
    end
    `TB_END
  end
endmodule
