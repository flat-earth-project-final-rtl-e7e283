// forney_deinterleaver: Forney convolutional deinterleaver for soft symbols.
//
// The transmitter's interleaver delays branch b by b*M symbols; this block
// delays branch b by (BRANCHES-1-b)*M so that every symbol sees the same total
// delay of (BRANCHES-1)*M*BRANCHES symbol times and leaves in its original
// order. The commutator moves one branch per input symbol and is set back to
// branch 0 by in_sof, which marks the first data symbol of a 72-bit frame
// (72 = 2*36, so every frame begins on branch 0). Each branch is a circular
// buffer inside one memory; branch b starts at M*sum_{k<b}(BRANCHES-1-k) and
// has its own pointer, so no modulo arithmetic is needed. The last branch
// has no delay. The memory holds M*BRANCHES*(BRANCHES-1)/2 symbols, 1,290,240
// bytes at the defaults (about 10 Mbit).
// Branch count, elementary delay and symbol width are the document's. The
// document keeps the symbols in external DDR3; here they are an on-chip
// array with one read and one write per symbol, which a DDR3 controller would
// replace.
// Interface: out_valid follows in_valid by one clock; out_branch is the branch
// the symbol left by, whose parity tells I (even) from Q (odd).
module forney_deinterleaver #(
  parameter int unsigned BRANCHES = 36,
  parameter int unsigned M        = 2048
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic              in_sof,
  input  logic signed [7:0] in_data,
  output logic              out_valid,
  output logic signed [7:0] out_data,
  output logic [$clog2(BRANCHES)-1:0] out_branch
);
  localparam int unsigned TOTAL = M * BRANCHES * (BRANCHES - 1) / 2;
  localparam int unsigned AW    = $clog2(TOTAL);
  localparam int unsigned LW    = $clog2((BRANCHES - 1) * M + 1);
  localparam int unsigned BW    = $clog2(BRANCHES);

  function automatic logic [AW-1:0] branch_base(input int unsigned b);
    int unsigned s;
    s = 0;
    for (int unsigned k = 0; k < b; k++) s += (BRANCHES - 1 - k) * M;
    return AW'(s);
  endfunction

  logic signed [7:0] mem [TOTAL];
  logic [LW-1:0] ptr [BRANCHES];
  logic [BW-1:0] br;       // branch for the current symbol
  logic [BW-1:0] cur;
  logic [LW-1:0] len;
  logic [AW-1:0] addr;

  always_comb begin
    cur  = in_sof ? '0 : br;
    len  = LW'((BRANCHES - 1 - 32'(cur)) * M);
    addr = branch_base(32'(cur)) + AW'(ptr[cur]);
  end

  always_ff @(posedge clk) begin
    if (in_valid && len != '0) mem[addr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      br        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_branch <= '0;
      for (int b = 0; b < BRANCHES; b++) ptr[b] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_branch <= cur;
        out_data   <= (len == '0) ? in_data : mem[addr];
        if (len != '0) ptr[cur] <= (ptr[cur] == len - 1'b1) ? '0 : ptr[cur] + 1'b1;
        br <= (cur == BW'(BRANCHES - 1)) ? '0 : cur + 1'b1;
      end
    end
  end
endmodule
