// tb_uw_sync: builds 80-bit frames (unique word 0x27 + 72 random bits) as
// soft pairs, prefixes random pairs so that the word sits at a chosen
// position, rotates the constellation by a chosen multiple of 90 degrees and
// adds noise. After the first set (4 frames here) the block must report the
// position and rotation, and every later output pair must equal the
// unrotated transmit pair N_FRAMES*FRAME_LEN pairs earlier, shifted by the
// position, with out_sof on the first word pair. Two runs use different
// positions and rotations.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_uw_sync;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  localparam int FL = 40, NF = 4, D = FL * NF;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [7:0] in_i = 0, in_q = 0, out_i, out_q;
  logic out_valid, out_sof, out_uw, locked;
  logic [1:0] rot;
  logic [5:0] offset;
  uw_sync #(.FRAME_LEN(FL), .N_FRAMES(NF)) dut (.*);

  `WATCHDOG(200000)

  task automatic run(int pre, int r);
    byte signed ti [$], tq [$];
    bit [7:0] uw = 8'h27;
    int n, sofs;
    rst <= 1; repeat (3) @(posedge clk); rst <= 0;
    for (int k = 0; k < pre; k++) begin
      ti.push_back(sat8(int'($urandom_range(0, 200)) - 100));
      tq.push_back(sat8(int'($urandom_range(0, 200)) - 100));
    end
    for (int f = 0; f < 4 * NF; f++)
      for (int p = 0; p < FL; p++) begin
        bit bi, bq;
        if (p < 4) begin bi = uw[7 - 2*p]; bq = uw[6 - 2*p]; end
        else begin bi = $urandom; bq = $urandom; end
        ti.push_back(bi ? 8'sd90 : -8'sd90);
        tq.push_back(bq ? 8'sd90 : -8'sd90);
      end
    n = 0; sofs = 0;
    for (int t = 0; t < ti.size(); t++) begin
      int a, b, c;
      // noise first, so the expected output is the noisy unrotated pair
      ti[t] = sat8(int'(ti[t]) + int'($urandom_range(0, 60)) - 30);
      tq[t] = sat8(int'(tq[t]) + int'($urandom_range(0, 60)) - 30);
      a = ti[t]; b = tq[t];
      for (int k = 0; k < r; k++) begin c = a; a = -b; b = c; end
      in_valid <= 1;
      in_i <= sat8(a);
      in_q <= sat8(b);
      @(posedge clk);
      in_valid <= 0;
      @(posedge clk);
      // output for input t appears now
      if (t >= 2 * D) begin
        int src;
        src = t - D + offset;
        `CHECK(out_valid, "out_valid")
        `CHECK(out_i == ti[src] && out_q == tq[src],
               $sformatf("pair %0d: got %0d,%0d want %0d,%0d", t, out_i, out_q, ti[src], tq[src]))
        `CHECK(out_sof == ((src - pre) % FL == 0), $sformatf("sof at %0d", t))
        if (out_sof) sofs++;
      end
    end
    $display("run pre=%0d r=%0d: offset=%0d rot=%0d", pre, r, offset, rot);
    `CHECK(locked, "locked")
    `CHECK(offset == pre % FL, $sformatf("offset %0d, want %0d", offset, pre % FL))
    `CHECK(rot == 2'(r), $sformatf("rotation %0d, want %0d", rot, r))
    `CHECK(sofs >= NF, $sformatf("frame starts seen %0d", sofs))
  endtask

  initial begin
    run(13, 1);
    run(38, 3);
    run(0, 2);
    `TB_END
  end
endmodule
