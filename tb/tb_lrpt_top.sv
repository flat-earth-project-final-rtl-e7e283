// tb_lrpt_top: end-to-end test of the receiver through its UART input.
//
// The testbench plays the satellite and the host demodulator: it builds a
// packet stream, cuts it into VCDUs (header with a frame counter, insert
// zone, first header pointer, 882-byte data zone), Reed-Solomon encodes each
// VCDU as four interleaved (255,223) code words, injects symbol errors into
// chosen code words, scrambles, adds the 0x1ACFFC1D marker, convolutionally
// encodes (K=7, r=1/2), differentially encodes each channel, interleaves
// with a Forney interleaver (36 branches, branch b delayed b*M*36 symbols),
// inserts the 0x27 unique word every 72 data bits, rotates the constellation
// by 90 degrees, adds noise and a few hard symbol flips, and sends the soft
// I/Q bytes over the serial line. A leading VCDU absorbs the start-up of the
// chain and trailing VCDUs flush its latency; they are not checked.
// Checks: every VCDU that was not made uncorrectable comes out exactly, the
// uncorrectable one is flagged, the packets that do not touch it come out
// intact and in order, the UART echo of the VCDU bytes matches, and each
// mechanism of the chain is seen at least once: unique word lock with the
// right rotation, Viterbi normalisation stall, CADU lock, RS correction,
// RS failure, packet split across VCDUs, packet resync. The error flag must
// stay low. Reduced sizes: 4 frames for the unique word search, M=1, two
// frames for the marker search, serial bit = 16 clocks.
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_lrpt_top;
  import lrpt_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NV = 3;            // checked VCDUs, counters 1..NV
  localparam int NLEAD = 1, NTAIL = 3;
  localparam int NC = NLEAD + NV + NTAIL;
  localparam int ZONE = 882;
  localparam int BAD = 3;           // VCDU made uncorrectable
  localparam int M = 1, ROT = 1;
  localparam int BIT_CLK = 16;

  logic uart_rx_i = 1, uart_tx_o;
  logic vcdu_valid, vcdu_first, vcdu_last, vcdu_fail;
  logic [7:0] vcdu_data;
  logic pkt_valid, pkt_sop, pkt_eop, pkt_split, pkt_resync;
  logic [7:0] pkt_data;
  logic uw_locked, cadu_locked, vit_norm, error_flag;
  logic [1:0] uw_rot;
  logic [3:0] rs_corrected, rs_failed;

  lrpt_top #(.BAUD_INC(131071), .UW_FRAMES(4), .FORNEY_M(M), .CADU_FRAMES(2)) dut (.*);

  byte unsigned vcdus [NC][892];
  byte unsigned stream [$];
  int pstart [$], plen [$], expect_idx [$];

  // ---------------- output monitors ----------------
  int n_norm = 0, n_corr = 0, n_fail = 0, n_split = 0, n_resync = 0;
  int n_vcdu_ok = 0, n_vcdu_fail = 0, n_bad_flagged = 0, pk = 0, n_uw_lock = 0;
  byte unsigned vbuf [$], cur [$], echo_q [$];
  bit seen_vcdu [NC];
  always @(posedge clk) if (!rst) begin
    if (vit_norm) n_norm++;
    n_corr += $countones(rs_corrected);
    n_fail += $countones(rs_failed);
    if (pkt_resync) n_resync++;
    if (vcdu_valid) begin
      if (vcdu_first) vbuf.delete();
      vbuf.push_back(vcdu_data);
      echo_q.push_back(vcdu_data);
      if (vcdu_last) begin
        int cnt;
        cnt = {vbuf[2], vbuf[3], vbuf[4]};
        if (vcdu_fail) n_vcdu_fail++;
        if (cnt >= 1 && cnt <= NV && vbuf.size() == 892) begin
          if (cnt == BAD) begin
            `CHECK(vcdu_fail, "uncorrectable VCDU flagged")
            n_bad_flagged++;
          end else if (!vcdu_fail) begin
            bit same;
            same = 1;
            foreach (vbuf[i]) if (vbuf[i] != vcdus[NLEAD + cnt - 1][i]) same = 0;
            `CHECK(same, $sformatf("VCDU %0d content", cnt))
            seen_vcdu[cnt] = 1;
            n_vcdu_ok++;
          end
        end
      end
    end
    if (pkt_valid) begin
      if (pkt_sop) cur.delete();
      cur.push_back(pkt_data);
      if (pkt_eop) begin
        if (pk < expect_idx.size()) begin
          int p;
          bit same;
          p = expect_idx[pk];
          same = (cur.size() == plen[p]);
          for (int i = 0; i < cur.size() && i < plen[p]; i++)
            if (cur[i] != stream[pstart[p] + i]) same = 0;
          `CHECK(same, $sformatf("packet %0d", p))
          if (pkt_split) n_split++;
        end
        pk++;
        cur.delete();
      end
    end
  end

  // serial echo of the VCDU bytes
  int n_echo = 0, echo_bad = 0;
  initial begin
    forever begin
      byte unsigned b;
      @(negedge uart_tx_o);
      repeat (BIT_CLK / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CLK) @(posedge clk);
        b[i] = uart_tx_o;
      end
      repeat (BIT_CLK) @(posedge clk);
      if (echo_q.size() == 0 || echo_q.pop_front() != b) echo_bad++;
      n_echo++;
    end
  end

  task automatic send_byte(byte unsigned b);
    uart_rx_i = 0;
    repeat (BIT_CLK) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rx_i = b[i];
      repeat (BIT_CLK) @(negedge clk);
    end
    uart_rx_i = 1;
    repeat (BIT_CLK) @(negedge clk);
  endtask

  `WATCHDOG(25000000)
  initial begin
    bit cadu_bits [$];
    byte signed sym [$];       // differentially encoded, serialised I,Q
    byte signed ilv [$];        // after the interleaver
    bit [5:0] h;
    bit ei, eq;
    int nflip;

    // ---- packet stream and VCDUs ----
    while (stream.size() < (NV + NTAIL) * ZONE) begin
      int n;
      // the first packet is long, so at least one packet spans two VCDUs
      n = (stream.size() == 0) ? 1300 :
          ($urandom_range(0, 5) == 0) ? $urandom_range(900, 1300) : $urandom_range(7, 300);
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
      if (ev < NV && !(sv <= BAD - 1 && BAD - 1 <= ev)) expect_idx.push_back(p);
    end
    for (int v = 0; v < NC; v++) begin
      int cnt, fhp;
      cnt = v - NLEAD + 1;           // 0 for the lead VCDU
      if (v >= NLEAD + NV) cnt = 100 + v;
      fhp = 11'h7FF;
      if (v >= NLEAD)
        foreach (pstart[p])
          if (pstart[p] >= (v - NLEAD) * ZONE && pstart[p] < (v - NLEAD + 1) * ZONE) begin
            fhp = pstart[p] - (v - NLEAD) * ZONE; break;
          end
      vcdus[v][0] = 8'h40; vcdus[v][1] = 8'h05;
      vcdus[v][2] = 8'(cnt >> 16); vcdus[v][3] = 8'(cnt >> 8); vcdus[v][4] = 8'(cnt);
      vcdus[v][5] = 8'h00; vcdus[v][6] = 8'h00; vcdus[v][7] = 8'h00;
      vcdus[v][8] = 8'(fhp >> 8); vcdus[v][9] = 8'(fhp);
      for (int i = 10; i < 892; i++)
        vcdus[v][i] = (v >= NLEAD) ? stream[(v - NLEAD) * ZONE + i - 10] : byte'($urandom);
    end

    // ---- RS encode, errors, scramble, marker ----
    for (int v = 0; v < NC; v++) begin
      byte unsigned cw [4][255];
      byte unsigned cadu [1024];
      for (int l = 0; l < 4; l++) begin
        byte unsigned msg [223];
        int ne;
        bit used [255];
        for (int i = 0; i < 223; i++) msg[i] = vcdus[v][4 * i + l];
        rs_encode(msg, cw[l]);
        ne = 0;
        if (v == NLEAD + 1) ne = (l == 0) ? 3 : (l == 1) ? 16 : (l == 3) ? 9 : 0;
        if (v == NLEAD + BAD - 1 && l == 2) ne = 24;
        foreach (used[i]) used[i] = 0;
        for (int e = 0; e < ne; e++) begin
          int pos;
          // the first two symbols of each word carry the VCDU header and
          // frame counter, which the checker needs even in a failed VCDU
          do pos = $urandom_range(2, 254); while (used[pos]);
          used[pos] = 1;
          cw[l][pos] ^= byte'($urandom_range(1, 255));
        end
      end
      cadu[0] = 8'h1A; cadu[1] = 8'hCF; cadu[2] = 8'hFC; cadu[3] = 8'h1D;
      for (int i = 0; i < 1020; i++) cadu[4 + i] = cw[i % 4][i / 4] ^ pn_byte(i % 255);
      foreach (cadu[i])
        for (int b = 7; b >= 0; b--) cadu_bits.push_back(cadu[i][b]);
    end

    // ---- convolutional and differential encoding ----
    h = 0; ei = 0; eq = 0; nflip = 0;
    foreach (cadu_bits[t]) begin
      bit [1:0] c;
      c = conv(cadu_bits[t], h);
      h = {cadu_bits[t], h[5:1]};
      ei ^= c[1];
      eq ^= c[0];
      sym.push_back(ei ? 8'sd90 : -8'sd90);
      sym.push_back(eq ? 8'sd90 : -8'sd90);
    end

    // ---- Forney interleaver: branch b delayed by b*M*36 symbols ----
    foreach (sym[k]) begin
      int d;
      d = (k % 36) * M * 36;
      ilv.push_back(k >= d ? sym[k - d] : 8'sd0);
    end

    // ---- unique word, rotation, noise, serial line ----
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    // The chain lags by about two CADUs (the marker search set) plus the
    // deinterleaver, unique word and Viterbi delays; sending stops once the
    // last checked CADU has been pushed through.
    for (int f = 0; f * 72 < (NLEAD + NV + 2) * 16384 + 4000; f++) begin
      bit [7:0] uw;
      uw = 8'h27;
      for (int p = 0; p < 40; p++) begin
        int a, b, c;
        if (p < 4) begin
          a = uw[7 - 2 * p] ? 90 : -90;
          b = uw[6 - 2 * p] ? 90 : -90;
        end else begin
          int k;
          k = f * 72 + 2 * (p - 4);
          a = (k < ilv.size()) ? int'(ilv[k]) : 0;
          b = (k + 1 < ilv.size()) ? int'(ilv[k + 1]) : 0;
          if ($urandom_range(0, 999) == 0) begin a = -a; nflip++; end
        end
        a += int'($urandom_range(0, 60)) - 30;
        b += int'($urandom_range(0, 60)) - 30;
        for (int r = 0; r < ROT; r++) begin c = a; a = -b; b = c; end
        send_byte(byte'(sat8(a)));
        send_byte(byte'(sat8(b)));
      end
    end
    repeat (200000) @(negedge clk);

    // ---- results ----
    for (int v = 1; v <= NV; v++)
      if (v != BAD) `CHECK(seen_vcdu[v], $sformatf("VCDU %0d received", v))
    `CHECK(n_bad_flagged == 1, "uncorrectable VCDU seen once")
    `CHECK(pk >= expect_idx.size(), $sformatf("packets %0d, want at least %0d", pk, expect_idx.size()))
    `CHECK(uw_locked && uw_rot == 2'(ROT), $sformatf("unique word lock, rotation %0d", uw_rot))
    `CHECK(cadu_locked, "CADU lock")
    `CHECK(n_norm > 0, "Viterbi normalisation stall")
    `CHECK(n_corr >= 3, "RS corrections")
    `CHECK(n_fail >= 1, "RS failure")
    `CHECK(n_split > 0, "packet split across VCDUs")
    `CHECK(n_resync > 0, "packet resync")
    `CHECK(n_echo > 0 && echo_bad == 0, $sformatf("serial echo %0d bytes, %0d bad", n_echo, echo_bad))
    `CHECK(!error_flag, "no overrun")
    $display("VCDUs ok %0d failed %0d, packets %0d, norm %0d, RS corr %0d fail %0d, split %0d, resync %0d, echo %0d, flips %0d",
             n_vcdu_ok, n_vcdu_fail, pk, n_norm, n_corr, n_fail, n_split, n_resync, n_echo, nflip);
    `TB_END
  end
endmodule
