// tb_viterbi_acs: random metrics; the output must be the smaller of the two
// sums and the decision must name it (ties choose predecessor 0).
`timescale 1ns/1ps
`include "tb/tb_macros.svh"
module tb_viterbi_acs;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [21:0] sm0, sm1, sm_out;
  logic [16:0] bm0, bm1;
  logic dec;
  viterbi_acs dut (.*);
  `WATCHDOG(100)
  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint p0, p1;
      sm0 = $urandom_range(0, 1 << 21); sm1 = (n % 10 == 0) ? sm0 : $urandom_range(0, 1 << 21);
      bm0 = $urandom_range(0, 130050);  bm1 = (n % 10 == 0) ? bm0 : $urandom_range(0, 130050);
      #1;
      p0 = sm0 + bm0; p1 = sm1 + bm1;
      `CHECK(dec == (p1 < p0), "decision")
      `CHECK(sm_out == ((p1 < p0) ? p1 : p0), "metric")
    end
    `TB_END
  end
endmodule
