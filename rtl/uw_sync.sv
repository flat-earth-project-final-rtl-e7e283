// uw_sync: unique-word synchroniser and phase derotator in front of the
// convolutional deinterleaver.
//
// The soft QPSK stream arrives as (I,Q) pairs of 8-bit two's complement
// values, positive meaning bit 1. Every FRAME_LEN pairs (80 bits: an 8-bit
// unique word 0x27 followed by 72 interleaved bits) the word should recur.
// For each of the FRAME_LEN candidate positions and each of the four QPSK
// rotations the block accumulates, over a set of N_FRAMES frames, the soft
// correlation of the newest four pairs with the unique word. At the end of a
// set the position and rotation with the highest total are taken; from then
// on the stream is read from a ring buffer one set behind the writer, shifted
// by that position so that out_sof marks the first pair of the unique word,
// and derotated. Output is in lockstep with input: one pair out for each pair
// in, N_FRAMES*FRAME_LEN pairs later. A change of position between sets slips
// the output by the difference.
// The document gives the word, frame length, set size (32 frames) and the
// derotation by the best word's rotation; the soft correlation score, the
// ring buffer and the lockstep reading are this design's choices.
module uw_sync #(
  parameter int unsigned FRAME_LEN = 40,  // pairs per frame (80 bits)
  parameter int unsigned N_FRAMES  = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [7:0] in_i,
  input  logic signed [7:0] in_q,
  output logic              out_valid,
  output logic signed [7:0] out_i,
  output logic signed [7:0] out_q,
  output logic              out_sof,    // first pair of a frame (first UW pair)
  output logic              out_uw,     // pair belongs to the unique word
  output logic              locked,
  output logic [1:0]        rot,        // rotation being undone
  output logic [$clog2(FRAME_LEN)-1:0] offset
);
  import lrpt_pkg::*;

  localparam int unsigned D     = FRAME_LEN * N_FRAMES;
  localparam int unsigned DEPTH = 2 * D;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned PW    = $clog2(FRAME_LEN);
  localparam int unsigned FW    = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1;
  localparam int unsigned SW    = FW + 13;

  typedef logic signed [SW-1:0] score_t;

  logic [15:0]  mem [DEPTH];
  logic [AW-1:0] wp;
  logic [PW-1:0] pos;       // position of the newest pair in its frame
  logic [FW-1:0] fidx;      // frame index within the set
  logic signed [7:0] win_i [4];
  logic signed [7:0] win_q [4];
  score_t score [FRAME_LEN][4];
  score_t best_score;
  logic [PW-1:0] best_off;
  logic [1:0]    best_rot;

  function automatic logic signed [7:0] neg8(input logic signed [7:0] v);
    return (v == -8'sd128) ? 8'sd127 : -v;
  endfunction

  // undo rotation r: rotation r is applied as (I,Q)->(-Q,I) r times
  function automatic logic [15:0] derot(input logic signed [7:0] i, input logic signed [7:0] q,
                                        input logic [1:0] r);
    unique case (r)
      2'd0: return {i, q};
      2'd1: return {q, neg8(i)};
      2'd2: return {neg8(i), neg8(q)};
      default: return {neg8(q), i};
    endcase
  endfunction

  // soft agreement of one value with one expected bit
  function automatic logic signed [9:0] agree(input logic signed [7:0] v, input logic b);
    return b ? 10'(v) : -10'(v);
  endfunction

  logic signed [12:0] corr [4];
  logic [PW-1:0] cand;      // start position of the window that ends at pos

  always_comb begin
    logic [15:0] p;
    logic signed [7:0] wi [4];
    logic signed [7:0] wq [4];
    for (int k = 0; k < 4; k++) begin
      wi[k] = (k == 3) ? in_i : win_i[k+1];
      wq[k] = (k == 3) ? in_q : win_q[k+1];
    end
    for (int r = 0; r < 4; r++) begin
      corr[r] = '0;
      for (int k = 0; k < 4; k++) begin
        p = derot(wi[k], wq[k], 2'(r));
        corr[r] = corr[r] + 13'(agree(p[15:8], UW_DEINT[7-2*k]))
                          + 13'(agree(p[7:0],  UW_DEINT[6-2*k]));
      end
    end
    cand = (pos >= PW'(3)) ? pos - PW'(3) : PW'(pos + PW'(FRAME_LEN) - PW'(3));
  end

  // best of the four new totals, used in the last frame of a set
  score_t        newv [4];
  score_t        nbest;
  logic [1:0]    nrot;
  always_comb begin
    for (int r = 0; r < 4; r++)
      newv[r] = ((fidx == '0) ? score_t'(0) : score[cand][r]) + score_t'(corr[r]);
    nbest = newv[0];
    nrot  = 2'd0;
    for (int r = 1; r < 4; r++)
      if (newv[r] > nbest) begin
        nbest = newv[r];
        nrot  = 2'(r);
      end
  end

  logic [AW:0] rp_full;
  logic [AW-1:0] rp;
  always_comb begin
    rp_full = {1'b0, wp} + (AW+1)'(D) + (AW+1)'(offset);
    if (rp_full >= (AW+1)'(DEPTH)) rp_full = rp_full - (AW+1)'(DEPTH);
    rp = rp_full[AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= {in_i, in_q};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp         <= '0;
      pos        <= '0;
      fidx       <= '0;
      locked     <= 1'b0;
      rot        <= '0;
      offset     <= '0;
      best_score <= '0;
      best_off   <= '0;
      best_rot   <= '0;
      out_valid  <= 1'b0;
      out_i      <= '0;
      out_q      <= '0;
      out_sof    <= 1'b0;
      out_uw     <= 1'b0;
      for (int k = 0; k < 4; k++) begin
        win_i[k] <= '0;
        win_q[k] <= '0;
      end
      for (int p = 0; p < FRAME_LEN; p++)
        for (int r = 0; r < 4; r++) score[p][r] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < 3; k++) begin
          win_i[k] <= win_i[k+1];
          win_q[k] <= win_q[k+1];
        end
        win_i[3] <= in_i;
        win_q[3] <= in_q;
        for (int r = 0; r < 4; r++) score[cand][r] <= newv[r];

        // running maximum over the final totals (all written in the last frame)
        if (fidx == FW'(N_FRAMES - 1)) begin
          if (pos == '0 || nbest > best_score) begin
            best_score <= nbest;
            best_off   <= cand;
            best_rot   <= nrot;
          end
        end

        // read the delayed, aligned, derotated stream
        {out_i, out_q} <= derot(mem[rp][15:8], mem[rp][7:0], rot);
        out_sof        <= (pos == '0);
        out_uw         <= (pos < PW'(4));

        wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (pos == PW'(FRAME_LEN - 1)) begin
          pos  <= '0;
          fidx <= (fidx == FW'(N_FRAMES - 1)) ? '0 : fidx + 1'b1;
          if (fidx == FW'(N_FRAMES - 1)) begin
            locked <= 1'b1;
            if (nbest > best_score) begin
              offset <= cand;
              rot    <= nrot;
            end else begin
              offset <= best_off;
              rot    <= best_rot;
            end
          end
        end else pos <= pos + 1'b1;
      end
    end
  end
endmodule
