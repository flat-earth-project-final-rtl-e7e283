// tb_cadu_sync: random frames of 256 bits (reduced from 8192) that begin
// with 0x1ACFFC1D, preceded by a chosen number of random bits and with a few
// bit errors. After the first set (2 frames here) the block must report the
// marker position, and every later output bit must equal the input bit one
// set earlier shifted by that position, with out_sof on the marker's first
// bit. Bits arrive with gaps.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_cadu_sync;
  int checks = 0, failures = 0;
  localparam int FL = 256, NF = 2, D = FL * NF;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_bit = 0, out_valid, out_bit, out_sof, locked;
  logic [7:0] offset;
  cadu_sync #(.FRAME_LEN(FL), .N_FRAMES(NF)) dut (.*);
  `WATCHDOG(200000)

  task automatic run(int pre);
    bit s [$];
    bit [31:0] asm_w = 32'h1ACFFC1D;
    int sofs;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int k = 0; k < pre; k++) s.push_back($urandom);
    for (int f = 0; f < 4 * NF; f++)
      for (int p = 0; p < FL; p++) s.push_back(p < 32 ? asm_w[31 - p] : 1'($urandom));
    for (int k = pre + 5; k < s.size(); k += 97) s[k] = ~s[k];   // channel errors
    sofs = 0;
    for (int t = 0; t < s.size(); t++) begin
      in_valid = 1; in_bit = s[t];
      @(negedge clk);
      in_valid = 0;
      if (t >= 2 * D) begin
        int src;
        src = t - D + offset;
        `CHECK(out_valid && out_bit == s[src], $sformatf("bit %0d", t))
        `CHECK(out_sof == ((src - pre) % FL == 0), $sformatf("sof at %0d", t))
        if (out_sof) sofs++;
      end
      if (t % 5 == 0) @(negedge clk);
    end
    `CHECK(locked, "locked")
    `CHECK(offset == 8'(pre % FL), $sformatf("offset %0d, want %0d", offset, pre % FL))
    `CHECK(sofs >= NF, "frame starts seen")
  endtask

  initial begin
    @(negedge clk);
    run(77);
    run(250);
    run(3);
    `TB_END
  end
endmodule
