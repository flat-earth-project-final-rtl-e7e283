// tb_rs_reinterleaver: four lanes deliver 223-symbol words at staggered
// times (with the fail flag on one lane for one VCDU); the output must be
// the 892 bytes in order A0 B0 C0 D0 A1 ..., first/last flags and out_fail
// on the affected VCDU. Three VCDUs, the later lanes overlapping the readout.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_rs_reinterleaver;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] in_valid = 0, in_last = 0, in_fail = 0;
  logic [7:0] in_data [4];
  logic out_valid, out_first, out_last, out_fail;
  logic [7:0] out_data;
  rs_reinterleaver dut (.*);
  byte unsigned words [3][4][223];
  int vout = 0, bidx = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    `CHECK(out_data == words[vout][bidx % 4][bidx / 4], $sformatf("vcdu %0d byte %0d", vout, bidx))
    `CHECK(out_first == (bidx == 0) && out_last == (bidx == 891), "flags")
    `CHECK(out_fail == (vout == 1), "fail flag")
    if (bidx == 891) begin bidx = 0; vout++; end else bidx++;
  end
  `WATCHDOG(50000)
  initial begin
    foreach (in_data[l]) in_data[l] = 0;
    foreach (words[v, l, i]) words[v][l][i] = byte'($urandom);
    repeat (2) @(negedge clk); rst = 0;
    for (int v = 0; v < 3; v++) begin
      // lane l starts 60*l clocks late
      for (int c = 0; c < 223 + 180; c++) begin
        for (int l = 0; l < 4; l++) begin
          int i;
          i = c - 60 * l;
          in_valid[l] = (i >= 0 && i < 223);
          in_last[l]  = (i == 222);
          in_fail[l]  = (v == 1 && l == 2 && i == 222);
          in_data[l]  = (i >= 0 && i < 223) ? words[v][l][i] : 8'h00;
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (500) @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    `CHECK(vout == 3, $sformatf("vcdus out %0d", vout))
    `TB_END
  end
endmodule
