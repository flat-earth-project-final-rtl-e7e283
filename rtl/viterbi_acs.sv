// viterbi_acs: add-compare-select for one trellis state.
//
// The two candidate paths into the state come from the predecessor whose
// dropped bit is 0 (sm0) and the one whose dropped bit is 1 (sm1). Each adds
// its branch metric; the smaller sum is the new state metric and dec tells
// which predecessor won (1 = the one with dropped bit 1). Ties keep
// predecessor 0. Purely combinational; the width is wide enough that the sum
// cannot overflow while the decoder's normalisation keeps the metrics below
// 2^(SM_W-1) + spread.
module viterbi_acs #(
  parameter int unsigned SM_W = 22,
  parameter int unsigned BM_W = 17
) (
  input  logic [SM_W-1:0] sm0,
  input  logic [SM_W-1:0] sm1,
  input  logic [BM_W-1:0] bm0,
  input  logic [BM_W-1:0] bm1,
  output logic [SM_W-1:0] sm_out,
  output logic            dec
);
  logic [SM_W-1:0] p0, p1;
  always_comb begin
    p0     = sm0 + SM_W'(bm0);
    p1     = sm1 + SM_W'(bm1);
    dec    = (p1 < p0);
    sm_out = dec ? p1 : p0;
  end
endmodule
