// cadu_sync: frame synchroniser for the decoded bit stream.
//
// Finds the attached sync marker 0x1ACFFC1D that starts every CADU of
// FRAME_LEN bits. For each of the FRAME_LEN candidate positions the block
// counts, over a set of N_FRAMES frames, how many of the 32 newest bits agree
// with the marker, keeping one count per position in a score memory
// (read-modify-write once per bit). During the last frame of a set it tracks
// the position with the highest total; at the end of the set that position
// becomes the alignment. The stream is read from a ring buffer one set behind
// the writer, shifted by the alignment, so out_sof marks the first bit of the
// marker. One bit leaves for every bit that enters. Because the soft stream
// was already derotated, only the marker itself (no rotated or inverted
// copies) is searched.
// Word, frame length (1024 bytes) and set size (8 CADUs) are the document's;
// it describes this as a second instance of the unique-word synchroniser.
// The hard-bit match count and the lockstep ring buffer are this design's
// choices.
module cadu_sync #(
  parameter int unsigned FRAME_LEN = 8192, // bits per CADU
  parameter int unsigned N_FRAMES  = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit,
  output logic out_sof,
  output logic locked,
  output logic [$clog2(FRAME_LEN)-1:0] offset
);
  import lrpt_pkg::*;

  localparam int unsigned WL    = 32;
  localparam int unsigned D     = FRAME_LEN * N_FRAMES;
  localparam int unsigned DEPTH = 2 * D;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned PW    = $clog2(FRAME_LEN);
  localparam int unsigned FW    = (N_FRAMES > 1) ? $clog2(N_FRAMES) : 1;
  localparam int unsigned SW    = $clog2(WL * N_FRAMES + 1);

  logic          mem   [DEPTH];
  logic [SW-1:0] score [FRAME_LEN];
  logic [AW-1:0] wp;
  logic [PW-1:0] pos;
  logic [FW-1:0] fidx;
  logic [WL-1:0] win;
  logic [SW-1:0] best_score;
  logic [PW-1:0] best_off;

  logic [WL-1:0] nwin;
  logic [5:0]    match;
  logic [PW-1:0] cand;
  logic [SW-1:0] newv;
  always_comb begin
    nwin  = {win[WL-2:0], in_bit};
    match = 6'(WL - $countones(nwin ^ UW_CADU));
    cand  = (pos >= PW'(WL - 1)) ? pos - PW'(WL - 1) : PW'(pos + PW'(FRAME_LEN) - PW'(WL - 1));
    newv  = ((fidx == '0) ? '0 : score[cand]) + SW'(match);
  end

  logic [AW:0]   rp_full;
  logic [AW-1:0] rp;
  always_comb begin
    rp_full = {1'b0, wp} + (AW+1)'(D) + (AW+1)'(offset);
    if (rp_full >= (AW+1)'(DEPTH)) rp_full = rp_full - (AW+1)'(DEPTH);
    rp = rp_full[AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[wp]      <= in_bit;
      score[cand]  <= newv;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp         <= '0;
      pos        <= '0;
      fidx       <= '0;
      win        <= '0;
      best_score <= '0;
      best_off   <= '0;
      offset     <= '0;
      locked     <= 1'b0;
      out_valid  <= 1'b0;
      out_bit    <= 1'b0;
      out_sof    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win     <= nwin;
        out_bit <= mem[rp];
        out_sof <= (pos == '0);
        if (fidx == FW'(N_FRAMES - 1) && (pos == '0 || newv > best_score)) begin
          best_score <= newv;
          best_off   <= cand;
        end
        wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (pos == PW'(FRAME_LEN - 1)) begin
          pos  <= '0;
          fidx <= (fidx == FW'(N_FRAMES - 1)) ? '0 : fidx + 1'b1;
          if (fidx == FW'(N_FRAMES - 1)) begin
            locked <= 1'b1;
            offset <= (newv > best_score) ? cand : best_off;
          end
        end else pos <= pos + 1'b1;
      end
    end
  end
endmodule
