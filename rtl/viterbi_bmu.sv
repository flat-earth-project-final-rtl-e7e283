// viterbi_bmu: branch metric unit of the Viterbi decoder.
//
// The two's complement soft values of a received (I,Q) pair are converted to
// offset binary (x+128, so 255 is a confident 1 and 0 a confident 0). For each
// of the four possible encoder output pairs 00, 01, 10, 11 (expected values
// 0 or 255 per bit) the metric is the squared Euclidean distance
// (rI-eI)^2 + (rQ-eQ)^2, as the document specifies. bm[{eI,eQ}] is that
// distance. Purely combinational.
module viterbi_bmu #(
  parameter int unsigned BM_W = 17
) (
  input  logic signed [7:0]  in_i,
  input  logic signed [7:0]  in_q,
  output logic [BM_W-1:0]    bm [4]
);
  logic [7:0]  ri, rq;
  logic [15:0] di [2];
  logic [15:0] dq [2];

  always_comb begin
    ri = {~in_i[7], in_i[6:0]};
    rq = {~in_q[7], in_q[6:0]};
    di[0] = 16'(ri) * 16'(ri);
    di[1] = 16'(8'd255 - ri) * 16'(8'd255 - ri);
    dq[0] = 16'(rq) * 16'(rq);
    dq[1] = 16'(8'd255 - rq) * 16'(8'd255 - rq);
    for (int e = 0; e < 4; e++)
      bm[e] = BM_W'(di[e[1]]) + BM_W'(dq[e[0]]);
  end
endmodule
