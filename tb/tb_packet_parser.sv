// tb_packet_parser: a stream of packets of random length (7..1300 bytes, so
// some span two or three VCDUs and some VCDUs carry no header start) is cut
// into 882-byte data zones with the matching first header pointers. One VCDU
// is marked uncorrectable. Every packet that does not touch the bad VCDU
// must come out intact and in order, with out_split set exactly for packets
// spanning more than one VCDU; the resync pulse must fire for the packet
// broken by the bad VCDU.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_packet_parser;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, in_fail = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_sop, out_eop, out_split, resync;
  logic [7:0] out_data;
  packet_parser dut (.*);

  localparam int NV = 20, ZONE = 882, BAD = 9;
  byte unsigned stream [$];
  int pstart [$], plen [$];
  int expect_idx [$];          // packets expected at the output
  int nresync = 0, pk = 0, nsplit = 0;
  byte unsigned cur [$];

  always @(posedge clk) if (!rst) begin
    if (resync) nresync++;
    if (out_valid) begin
      // a packet cut short by a resync is abandoned without an eop
      if (out_sop) cur.delete();
      `CHECK(out_sop == (cur.size() == 0), "sop on first byte")
      cur.push_back(out_data);
      if (out_eop) begin
        if (pk < expect_idx.size()) begin
          int p, sv, ev;
          p = expect_idx[pk];
          `CHECK(cur.size() == plen[p], $sformatf("packet %0d length %0d want %0d", p, cur.size(), plen[p]))
          for (int i = 0; i < cur.size() && i < plen[p]; i++)
            `CHECK(cur[i] == stream[pstart[p] + i], $sformatf("packet %0d byte %0d got %h want %h", p, i, cur[i], stream[pstart[p] + i]))
          sv = pstart[p] / ZONE; ev = (pstart[p] + plen[p] - 1) / ZONE;
          `CHECK(out_split == (sv != ev), $sformatf("split flag packet %0d", p))
          if (out_split) nsplit++;
        end else `CHECK(0, "unexpected packet")
        pk++;
        cur.delete();
      end
    end
  end

  `WATCHDOG(100000)
  initial begin
    // build the packet stream
    while (stream.size() < NV * ZONE) begin
      int n;
      n = ($urandom_range(0, 5) == 0) ? $urandom_range(900, 1300) : $urandom_range(7, 300);
      pstart.push_back(stream.size());
      plen.push_back(n);
      for (int i = 0; i < n; i++) begin
        byte unsigned b;
        b = byte'($urandom);
        if (i == 4) b = 8'((n - 7) >> 8);
        if (i == 5) b = 8'(n - 7);
        stream.push_back(b);
      end
    end
    foreach (pstart[p]) begin
      int sv, ev;
      sv = pstart[p] / ZONE; ev = (pstart[p] + plen[p] - 1) / ZONE;
      if (ev < NV && !(sv <= BAD && BAD <= ev)) expect_idx.push_back(p);
    end
    repeat (2) @(negedge clk); rst = 0;
    for (int v = 0; v < NV; v++) begin
      int fhp;
      fhp = 11'h7FF;
      foreach (pstart[p])
        if (pstart[p] >= v * ZONE && pstart[p] < (v + 1) * ZONE) begin
          fhp = pstart[p] - v * ZONE; break;
        end
      for (int k = 0; k < 892; k++) begin
        in_valid = 1; in_first = (k == 0); in_fail = (v == BAD);
        in_data = (k == 8) ? 8'(fhp >> 8) : (k == 9) ? 8'(fhp) :
                  (k < 10) ? 8'(k + 8'h40) : stream[v * ZONE + k - 10];
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    repeat (10) @(negedge clk);
    `CHECK(pk == expect_idx.size(), $sformatf("packets out %0d want %0d", pk, expect_idx.size()))
    `CHECK(nresync >= 1, "resync seen")
    `CHECK(nsplit >= 3, "packets split across VCDUs")
    $display("packets %0d, split %0d, resync %0d", pk, nsplit, nresync);
    `TB_END
  end
endmodule
