// rs_decoder: one RS(255,223) decoder with error corrector.
//
// A code word (255 symbols, first symbol r254) is written into one half of a
// ping-pong buffer while rs_syndrome evaluates it. If all syndromes are zero
// the word is taken as correct. Otherwise rs_berlekamp_massey finds Lambda(x),
// rs_omega forms Omega(x), and rs_chien_forney walks the 255 positions in
// reception order, writing the error value of each message position into an
// error buffer and counting the roots. The word counts as decodable when the
// number of roots equals deg Lambda (at most 16). The corrector then streams
// out the 223 message symbols r_i XOR e_i (subtraction in GF(2^8)); the 32
// parity symbols are dropped. An undecodable word leaves uncorrected with
// out_fail set. The other buffer half takes the next code word meanwhile,
// so a new word may start as soon as the previous one has been received.
// Timing (worst case): 255 input symbols, then about 64 clocks of
// Berlekamp-Massey, 256 of Chien search and 223 of output.
// The chain of units is the document's; the ping-pong buffer, the failure
// test and the pass-through of failed words are this design's choices.
module rs_decoder (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic       in_start,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic       out_first,
  output logic       out_last,
  output logic [7:0] out_data,
  output logic       out_fail,     // with out_last: word could not be corrected
  output logic [4:0] out_nerr,     // with out_last: symbols corrected
  output logic       overrun       // a word finished while the previous was still in process
);
  import lrpt_pkg::*;

  typedef enum logic [2:0] {P_IDLE, P_BM, P_CHIEN, P_OUT} pstate_t;
  pstate_t pst;

  logic [7:0] rbuf [2][RS_N];
  logic [7:0] ebuf [RS_K];
  logic       wbank, pbank;
  logic [7:0] widx;
  gf_t        syn_live [RS_2T];
  gf_t        syn      [RS_2T];
  gf_t        lambda   [RS_T+1];
  gf_t        omega    [RS_T];
  logic [5:0] deg;
  logic       syn_done, bm_done;
  logic       cf_valid, cf_done;
  gf_t        cf_err;
  logic [8:0] nroots;
  logic [7:0] cidx, oidx;
  logic       fail, no_err;
  logic       bm_start, cf_start;

  rs_syndrome u_syn (.clk, .rst, .in_valid, .in_start, .in_data, .syn(syn_live), .done(syn_done));

  always_ff @(posedge clk) begin
    if (in_valid) rbuf[wbank][in_start ? 8'd0 : widx] <= in_data;
  end

  rs_berlekamp_massey u_bm (.clk, .rst, .start(bm_start), .syn, .lambda, .deg, .done(bm_done));
  rs_omega u_om (.syn, .lambda, .omega);
  rs_chien_forney u_cf (.clk, .rst, .start(cf_start), .lambda, .omega,
                        .out_valid(cf_valid), .err_val(cf_err), .done(cf_done), .nroots);

  always_ff @(posedge clk) begin
    if (cf_valid && cidx < 8'(RS_K)) ebuf[cidx] <= cf_err;
  end

  logic syn_zero;
  always_comb begin
    syn_zero = 1'b1;
    for (int j = 0; j < RS_2T; j++) if (syn_live[j] != 8'h00) syn_zero = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pst       <= P_IDLE;
      wbank     <= 1'b0;
      pbank     <= 1'b0;
      widx      <= '0;
      cidx      <= '0;
      oidx      <= '0;
      fail      <= 1'b0;
      no_err    <= 1'b0;
      bm_start  <= 1'b0;
      cf_start  <= 1'b0;
      overrun   <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      out_fail  <= 1'b0;
      out_nerr  <= '0;
      for (int j = 0; j < RS_2T; j++) syn[j] <= '0;
    end else begin
      bm_start  <= 1'b0;
      cf_start  <= 1'b0;
      overrun   <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid) widx <= (in_start ? 8'd0 : widx) + 1'b1;

      if (syn_done) begin
        wbank <= ~wbank;
        if (pst != P_IDLE) overrun <= 1'b1;
        pbank  <= wbank;
        syn    <= syn_live;
        no_err <= syn_zero;
        fail   <= 1'b0;
        oidx   <= '0;
        if (syn_zero) pst <= P_OUT;
        else begin
          pst      <= P_BM;
          bm_start <= 1'b1;
        end
      end else begin
        unique case (pst)
          P_BM: if (bm_done) begin
            pst      <= P_CHIEN;
            cf_start <= 1'b1;
            cidx     <= '0;
          end
          P_CHIEN: begin
            if (cf_valid) cidx <= cidx + 1'b1;
            if (cf_done) begin
              fail <= (deg > 6'(RS_T)) || (nroots != 9'(deg));
              pst  <= P_OUT;
            end
          end
          P_OUT: begin
            out_valid <= 1'b1;
            out_first <= (oidx == '0);
            out_last  <= (oidx == 8'(RS_K - 1));
            out_data  <= rbuf[pbank][oidx] ^ ((no_err || fail) ? 8'h00 : ebuf[oidx]);
            out_fail  <= fail;
            out_nerr  <= (no_err || fail) ? 5'd0 : 5'(deg);
            oidx      <= oidx + 1'b1;
            if (oidx == 8'(RS_K - 1)) pst <= P_IDLE;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
