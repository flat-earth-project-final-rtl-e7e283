// packet_parser: extracts the packets (the document's MPDUs) carried in the
// VCDU data zone.
//
// A VCDU of 892 bytes holds a 6-byte VCDU header, a 2-byte insert zone, a
// 2-byte M_PDU header whose low 11 bits are the first header pointer (offset
// of the first packet header in the data zone; 0x7FF = no header starts
// here), and an 882-byte data zone.
// Packets run back to back through the data zones and may continue into the
// next VCDU. Each packet starts with a 6-byte header whose bytes 4..5 hold its
// length minus 7 (the CCSDS space packet convention). The FSM copies packet
// bytes out, counting down the length taken from the header; a packet that
// runs past the end of a VCDU is kept open and completed from the next VCDU
// (out_split marks such packets on out_eop). After reset, after a VCDU marked
// as uncorrectable, or when the pointer disagrees with the running count, the
// parser drops the partial packet and waits for the position the pointer
// gives.
// The use of the first header pointer and the joining of packets across VCDUs
// are the document's; the header layouts (VCDU, M_PDU, packet length field)
// come from the CCSDS/Meteor-M conventions the LRPT format uses and are not spelt out
// in the document.
// Interface: one VCDU byte per in_valid, in_first on byte 0; packet bytes leave
// one clock later with out_sop on the first header byte and out_eop on the
// last byte.
module packet_parser #(
  parameter int unsigned VCDU_LEN = 892,
  parameter int unsigned HDR_LEN  = 10    // VCDU header + insert zone + M_PDU header
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_fail,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_sop,
  output logic       out_eop,
  output logic       out_split,
  output logic       resync        // pulse: a partial packet was dropped
);
  localparam logic [10:0] NO_HDR = 11'h7FF;

  logic [9:0]  k;          // byte index in the VCDU
  logic [10:0] fhp;
  logic [2:0]  fhp_hi;
  logic        synced;     // inside the packet stream
  logic        in_pkt;
  logic [16:0] remain;     // bytes left in the current packet
  logic [2:0]  hcnt;       // header bytes seen
  logic [7:0]  len_hi;
  logic        crossed;
  logic        vcdu_bad;

  logic [9:0]  kk;
  logic [9:0]  z;          // data zone offset
  always_comb begin
    kk = in_first ? '0 : k;
    z  = kk - 10'(HDR_LEN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      k         <= '0;
      fhp       <= NO_HDR;
      fhp_hi    <= '0;
      synced    <= 1'b0;
      in_pkt    <= 1'b0;
      remain    <= '0;
      hcnt      <= '0;
      len_hi    <= '0;
      crossed   <= 1'b0;
      vcdu_bad  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_split <= 1'b0;
      resync    <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_split <= 1'b0;
      resync    <= 1'b0;
      if (in_valid) begin
        k <= (kk == 10'(VCDU_LEN - 1)) ? kk : kk + 1'b1;
        if (in_first) begin
          vcdu_bad <= in_fail;
          if (in_fail) begin
            if (in_pkt) resync <= 1'b1;
            synced <= 1'b0;
            in_pkt <= 1'b0;
          end
          if (in_pkt) crossed <= 1'b1;
        end
        if (kk == 10'(HDR_LEN - 2)) fhp_hi <= in_data[2:0];
        if (kk == 10'(HDR_LEN - 1)) fhp    <= {fhp_hi, in_data};
        if (kk >= 10'(HDR_LEN) && !(in_first ? in_fail : vcdu_bad)) begin
          logic starts;
          starts = (fhp != NO_HDR) && (11'(z) == fhp);
          if ((!in_pkt && (synced || starts)) || (in_pkt && starts)) begin
            // first byte of a packet header; a pointer hit inside a packet
            // means the running count was wrong: drop the partial packet
            if (in_pkt) resync <= 1'b1;
            in_pkt    <= 1'b1;
            synced    <= 1'b1;
            crossed   <= 1'b0;
            hcnt      <= 3'd1;
            remain    <= 17'd5;   // header bytes still to come; the length is added later
            out_valid <= 1'b1;
            out_sop   <= 1'b1;
            out_data  <= in_data;
          end else if (in_pkt) begin
            begin
              logic [16:0] r;
              r = remain - 1'b1;
              if (hcnt == 3'd4) len_hi <= in_data;
              if (hcnt == 3'd5) r = r + {len_hi, in_data} + 17'd1;  // data bytes = length + 1
              if (hcnt < 3'd6) hcnt <= hcnt + 1'b1;
              out_valid <= 1'b1;
              out_data  <= in_data;
              remain    <= r;
              if (r == '0) begin
                out_eop   <= 1'b1;
                out_split <= crossed;
                in_pkt    <= 1'b0;
              end
            end
          end
        end
      end
    end
  end
endmodule
