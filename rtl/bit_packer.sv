// bit_packer: packs the aligned CADU bit stream into bytes, MSB first.
//
// in_sof restarts the packing so that the first byte of a frame begins at the
// marked bit. Each completed byte leaves with its index within the frame
// (0 = first marker byte), counted up to FRAME_BYTES-1 and then held until the
// next in_sof. Helper of the CADU path; the MSB-first order is the usual
// convention for the sync marker 0x1ACFFC1D.
module bit_packer #(
  parameter int unsigned FRAME_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic       in_bit,
  input  logic       in_sof,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic [$clog2(FRAME_BYTES)-1:0] out_idx,
  output logic       out_in_frame   // out_idx is inside the current frame
);
  localparam int unsigned IW = $clog2(FRAME_BYTES);
  logic [2:0]    bcnt;
  logic [6:0]    acc;
  logic [IW:0]   idx;
  logic          seen_sof;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt <= '0;
      acc  <= '0;
      idx  <= '0;
      seen_sof     <= 1'b0;
      out_valid    <= 1'b0;
      out_byte     <= '0;
      out_idx      <= '0;
      out_in_frame <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        logic [2:0]  b;
        logic [IW:0] i;
        b = in_sof ? 3'd0 : bcnt;
        i = in_sof ? '0 : idx;
        if (in_sof) seen_sof <= 1'b1;
        if (b == 3'd7) begin
          out_valid    <= 1'b1;
          out_byte     <= {acc, in_bit};
          out_idx      <= IW'(i);
          out_in_frame <= (seen_sof || in_sof) && (i < (IW+1)'(FRAME_BYTES));
          idx          <= (i < (IW+1)'(FRAME_BYTES)) ? i + 1'b1 : i;
        end else idx <= i;
        acc  <= {acc[5:0], in_bit};
        bcnt <= b + 1'b1;
      end
    end
  end
endmodule
