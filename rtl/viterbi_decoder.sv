// viterbi_decoder: K=7, rate 1/2 Viterbi decoder (generators 1111001 and
// 1011011) for soft (I,Q) pairs.
//
// Each accepted pair is turned into four branch metrics (viterbi_bmu); 64
// add-compare-select units (viterbi_acs) then update all state metrics at
// once and produce a column of 64 decision bits for the traceback unit
// (viterbi_tbu). State s holds the six previous input bits, newest in s[5];
// the predecessors of s are {s[4:0],0} and {s[4:0],1}.
// Metrics grow without bound, and the spread between them rules out modulo
// arithmetic, so they are normalised: when the smallest metric exceeds
// floor(m/2), m being the largest representable metric, floor(m/2) is
// subtracted from all of them. That is the case exactly when every metric has
// its top bit set, and the subtraction takes a cycle of its own in which
// in_ready is low (a stall). The normalisation rule, the squared Euclidean
// branch metric and the traceback parameters are the document's; all metrics
// start at 0 because decoding begins mid-stream, which is this design's choice.
// Interface: valid/ready on the input; decoded bits leave one per clock with
// out_valid, in order, roughly X+B to X+2B pairs after their own pair.
module viterbi_decoder #(
  parameter int unsigned SM_W = 22,
  parameter int unsigned S    = 120,
  parameter int unsigned X    = 30,
  parameter int unsigned B    = 30
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic signed [7:0] in_i,
  input  logic signed [7:0] in_q,
  output logic              out_valid,
  output logic              out_bit,
  output logic              norm_stall,   // this cycle normalises (stall)
  output logic              tb_overflow
);
  import lrpt_pkg::*;
  localparam int unsigned BM_W = 17;
  localparam logic [SM_W-1:0] HALF = {1'b0, {(SM_W-1){1'b1}}};

  logic [BM_W-1:0] bm [4];
  logic [SM_W-1:0] sm     [VIT_STATES];
  logic [SM_W-1:0] sm_new [VIT_STATES];
  logic [VIT_STATES-1:0] dec;
  logic step;

  viterbi_bmu #(.BM_W(BM_W)) u_bmu (.in_i, .in_q, .bm);

  for (genvar s = 0; s < VIT_STATES; s++) begin : g_acs
    localparam logic [5:0] P0 = {6'(s) << 1};
    localparam logic [5:0] P1 = {6'(s) << 1} | 6'd1;
    localparam logic [1:0] E0 = conv_out(s[5], P0);
    localparam logic [1:0] E1 = conv_out(s[5], P1);
    viterbi_acs #(.SM_W(SM_W), .BM_W(BM_W)) u_acs (
      .sm0(sm[P0]), .sm1(sm[P1]), .bm0(bm[E0]), .bm1(bm[E1]),
      .sm_out(sm_new[s]), .dec(dec[s]));
  end

  always_comb begin
    norm_stall = 1'b1;
    for (int s = 0; s < VIT_STATES; s++) norm_stall &= sm[s][SM_W-1];
  end
  assign in_ready = !norm_stall;
  assign step     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < VIT_STATES; s++) sm[s] <= '0;
    end else if (norm_stall) begin
      for (int s = 0; s < VIT_STATES; s++) sm[s] <= sm[s] - HALF;
    end else if (step) begin
      for (int s = 0; s < VIT_STATES; s++) sm[s] <= sm_new[s];
    end
  end

  viterbi_tbu #(.S(S), .X(X), .B(B), .STATES(VIT_STATES)) u_tbu (
    .clk, .rst, .step, .dec, .out_valid, .out_bit, .overflow(tb_overflow));
endmodule
