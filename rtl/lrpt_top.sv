// lrpt_top: FPGA part of a Meteor-M LRPT receiver.
//
// The host demodulates the OQPSK signal and sends soft symbols (8-bit two's
// complement, positive = bit 1, I then Q) over a UART. The chain below
// undoes every layer the satellite added and returns the VCDUs (corrected
// 892-byte frames) and the packets they carry:
//
//   uart_rx -> pair I/Q -> uw_sync (0x27 every 80 bits, derotate)
//     -> drop unique word, serialise -> forney_deinterleaver (36 x M)
//     -> diff_decoder -> pair I/Q -> viterbi_decoder (K=7, r=1/2)
//     -> cadu_sync (0x1ACFFC1D every 1024 bytes) -> bit_packer
//     -> drop marker -> descrambler -> rs_deinterleaver -> 4 x rs_decoder
//     -> rs_reinterleaver -> VCDU out, packet_parser, and VCDU bytes back
//        to the host through sync_fifo -> uart_tx
//
// The order of the stages and the sizes are the document's. Pairing I/Q from
// the byte stream starting at reset, sending VCDU bytes back over the UART,
// and the status outputs are this design's choices. The JPEG/MCU decoder and
// the HDMI output that would follow the packet output are not part of this
// RTL; the packet stream is brought out instead.
// Some block outputs are left unused on purpose: the sync offsets, the UART
// framing error (a bad byte simply corrupts one soft value), the unique-word
// frame start (the first data symbol is found from the UW flag instead), the
// upper deinterleaver branch bits (only the I/Q parity is needed) and the RS
// first-symbol flag (the reinterleaver tracks lanes itself).
// Timing: the chain is driven by the UART byte rate; every stage after it
// has spare cycles between symbols (the serialiser needs at least two clocks
// between symbol pairs, which any UART rate provides).
module lrpt_top #(
  parameter int unsigned BAUD_INC    = 2416, // 16x sample tick increment (2^17 accumulator)
  parameter int unsigned UW_FRAMES   = 32,
  parameter int unsigned FORNEY_M    = 2048,
  parameter int unsigned CADU_FRAMES = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       uart_rx_i,
  output logic       uart_tx_o,
  // corrected VCDUs
  output logic       vcdu_valid,
  output logic       vcdu_first,
  output logic       vcdu_last,
  output logic       vcdu_fail,
  output logic [7:0] vcdu_data,
  // packets (towards the image decoder)
  output logic       pkt_valid,
  output logic [7:0] pkt_data,
  output logic       pkt_sop,
  output logic       pkt_eop,
  output logic       pkt_split,
  output logic       pkt_resync,      // pulse: a partial packet was dropped
  // status
  output logic       uw_locked,
  output logic [1:0] uw_rot,
  output logic       cadu_locked,
  output logic       vit_norm,        // pulse: Viterbi normalisation stall
  output logic [3:0] rs_corrected,    // pulse per lane: word corrected
  output logic [3:0] rs_failed,       // pulse per lane: word uncorrectable
  output logic       error_flag       // sticky: an internal overrun happened
);
  import lrpt_pkg::*;

  // ---------------- UART receive ----------------
  logic tick;
  logic [7:0] rx_byte;
  logic rx_valid, rx_ferr;
  uart_baud_gen #(.ACC_W(17), .INC(BAUD_INC)) u_baud (.clk, .rst, .tick);
  uart_rx u_rx (.clk, .rst, .tick, .rx(uart_rx_i), .data_out(rx_byte),
                .data_valid(rx_valid), .frame_error(rx_ferr));

  logic              have_i, pair_valid;
  logic signed [7:0] pend_i, pair_i, pair_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      have_i     <= 1'b0;
      pend_i     <= '0;
      pair_valid <= 1'b0;
      pair_i     <= '0;
      pair_q     <= '0;
    end else begin
      pair_valid <= 1'b0;
      if (rx_valid) begin
        if (!have_i) begin
          pend_i <= rx_byte;
          have_i <= 1'b1;
        end else begin
          pair_i     <= pend_i;
          pair_q     <= rx_byte;
          pair_valid <= 1'b1;
          have_i     <= 1'b0;
        end
      end
    end
  end

  // ---------------- unique word sync ----------------
  logic              uw_valid, uw_sof, uw_isuw;
  logic signed [7:0] uw_i, uw_q;
  uw_sync #(.FRAME_LEN(40), .N_FRAMES(UW_FRAMES)) u_uw (
    .clk, .rst, .in_valid(pair_valid), .in_i(pair_i), .in_q(pair_q),
    .out_valid(uw_valid), .out_i(uw_i), .out_q(uw_q), .out_sof(uw_sof), .out_uw(uw_isuw),
    .locked(uw_locked), .rot(uw_rot), .offset());

  // drop the unique word, serialise the pair, flag the first data symbol
  logic              prev_uw, q_pend;
  logic signed [7:0] q_hold;
  logic              sym_valid, sym_sof;
  logic signed [7:0] sym_data;
  always_ff @(posedge clk) begin
    if (rst) begin
      prev_uw   <= 1'b0;
      q_pend    <= 1'b0;
      q_hold    <= '0;
      sym_valid <= 1'b0;
      sym_sof   <= 1'b0;
      sym_data  <= '0;
    end else begin
      sym_valid <= 1'b0;
      sym_sof   <= 1'b0;
      if (q_pend) begin
        sym_valid <= 1'b1;
        sym_data  <= q_hold;
        q_pend    <= 1'b0;
      end else if (uw_valid) begin
        prev_uw <= uw_isuw;
        if (!uw_isuw) begin
          sym_valid <= 1'b1;
          sym_sof   <= prev_uw;
          sym_data  <= uw_i;
          q_hold    <= uw_q;
          q_pend    <= 1'b1;
        end
      end
    end
  end
  assert property (@(posedge clk) disable iff (rst) !(q_pend && uw_valid && !uw_isuw))
    else $error("lrpt_top: symbol pairs arrive faster than the serialiser");

  // ---------------- Forney deinterleaver, differential decoding ----------------
  logic              di_valid;
  logic signed [7:0] di_data;
  logic [5:0]        di_branch;
  forney_deinterleaver #(.BRANCHES(36), .M(FORNEY_M)) u_forney (
    .clk, .rst, .in_valid(sym_valid), .in_sof(sym_sof), .in_data(sym_data),
    .out_valid(di_valid), .out_data(di_data), .out_branch(di_branch));

  logic              dd_valid, dd_q;
  logic signed [7:0] dd_data;
  diff_decoder u_diff (.clk, .rst, .in_valid(di_valid), .in_q(di_branch[0]), .in_data(di_data),
                       .out_valid(dd_valid), .out_q(dd_q), .out_data(dd_data));

  // ---------------- Viterbi ----------------
  logic              v_pend, v_ready, v_have_i;
  logic signed [7:0] v_i, v_q, v_hold_i;
  logic              vit_valid, vit_bit, vit_tb_ovf;
  always_ff @(posedge clk) begin
    if (rst) begin
      v_pend   <= 1'b0;
      v_have_i <= 1'b0;
      v_i      <= '0;
      v_q      <= '0;
      v_hold_i <= '0;
    end else begin
      if (v_pend && v_ready) v_pend <= 1'b0;
      if (dd_valid) begin
        if (!dd_q) begin
          v_hold_i <= dd_data;
          v_have_i <= 1'b1;
        end else if (v_have_i) begin
          v_i      <= v_hold_i;
          v_q      <= dd_data;
          v_pend   <= 1'b1;
          v_have_i <= 1'b0;
        end
      end
    end
  end
  viterbi_decoder u_vit (.clk, .rst, .in_valid(v_pend), .in_ready(v_ready), .in_i(v_i), .in_q(v_q),
                         .out_valid(vit_valid), .out_bit(vit_bit), .norm_stall(vit_norm),
                         .tb_overflow(vit_tb_ovf));

  // ---------------- CADU sync, bytes, descrambling ----------------
  logic cs_valid, cs_bit, cs_sof;
  cadu_sync #(.FRAME_LEN(8192), .N_FRAMES(CADU_FRAMES)) u_cadu (
    .clk, .rst, .in_valid(vit_valid), .in_bit(vit_bit),
    .out_valid(cs_valid), .out_bit(cs_bit), .out_sof(cs_sof), .locked(cadu_locked), .offset());

  logic       bp_valid, bp_inframe;
  logic [7:0] bp_byte;
  logic [9:0] bp_idx;
  bit_packer #(.FRAME_BYTES(1024)) u_pack (
    .clk, .rst, .in_valid(cs_valid), .in_bit(cs_bit), .in_sof(cs_sof),
    .out_valid(bp_valid), .out_byte(bp_byte), .out_idx(bp_idx), .out_in_frame(bp_inframe));

  logic       ds_in_valid;
  logic       ds_valid, ds_first;
  logic [7:0] ds_data;
  assign ds_in_valid = bp_valid && bp_inframe && cadu_locked && (bp_idx >= 10'd4);
  descrambler u_desc (.clk, .rst, .in_valid(ds_in_valid), .new_cvcdu(bp_idx == 10'd4),
                      .in_data(bp_byte), .out_valid(ds_valid), .out_data(ds_data), .out_first(ds_first));

  // ---------------- Reed-Solomon ----------------
  logic [3:0] rl_valid;
  logic       rl_start;
  logic [7:0] rl_data;
  rs_deinterleaver #(.DEPTH(4)) u_rsdi (
    .clk, .rst, .in_valid(ds_valid), .in_first(ds_first), .in_data(ds_data),
    .out_valid(rl_valid), .out_start(rl_start), .out_data(rl_data));

  logic [3:0] rd_valid, rd_last, rd_fail, rd_ovr;
  logic [7:0] rd_data [4];
  logic [4:0] rd_nerr [4];
  for (genvar l = 0; l < 4; l++) begin : g_rs
    rs_decoder u_rs (.clk, .rst, .in_valid(rl_valid[l]), .in_start(rl_start), .in_data(rl_data),
                     .out_valid(rd_valid[l]), .out_first(), .out_last(rd_last[l]),
                     .out_data(rd_data[l]), .out_fail(rd_fail[l]), .out_nerr(rd_nerr[l]),
                     .overrun(rd_ovr[l]));
    assign rs_corrected[l] = rd_valid[l] && rd_last[l] && !rd_fail[l] && (rd_nerr[l] != '0);
    assign rs_failed[l]    = rd_valid[l] && rd_last[l] && rd_fail[l];
  end

  rs_reinterleaver #(.DEPTH(4), .K(223)) u_rsri (
    .clk, .rst, .in_valid(rd_valid), .in_last(rd_last), .in_fail(rd_fail), .in_data(rd_data),
    .out_valid(vcdu_valid), .out_first(vcdu_first), .out_last(vcdu_last),
    .out_data(vcdu_data), .out_fail(vcdu_fail));

  // ---------------- packets ----------------
  packet_parser #(.VCDU_LEN(892), .HDR_LEN(10)) u_pp (
    .clk, .rst, .in_valid(vcdu_valid), .in_first(vcdu_first), .in_fail(vcdu_fail), .in_data(vcdu_data),
    .out_valid(pkt_valid), .out_data(pkt_data), .out_sop(pkt_sop), .out_eop(pkt_eop),
    .out_split(pkt_split), .resync(pkt_resync));

  // ---------------- VCDU bytes back to the host ----------------
  logic       fifo_empty, fifo_ovf, tx_ready, tx_start;
  logic [7:0] fifo_data;
  sync_fifo #(.WIDTH(8), .DEPTH(1024)) u_fifo (
    .clk, .rst, .wr_en(vcdu_valid), .wr_data(vcdu_data), .rd_en(tx_start),
    .rd_data(fifo_data), .empty(fifo_empty), .overflow(fifo_ovf));
  assign tx_start = tx_ready && !fifo_empty;
  uart_tx u_tx (.clk, .rst, .tick, .start(tx_start), .data_in(fifo_data), .ready(tx_ready),
                .tx(uart_tx_o));

  always_ff @(posedge clk) begin
    if (rst) error_flag <= 1'b0;
    else if (vit_tb_ovf || (|rd_ovr) || fifo_ovf) error_flag <= 1'b1;
  end
endmodule
