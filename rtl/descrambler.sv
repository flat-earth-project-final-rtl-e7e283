// descrambler: removes the pseudo-random noise from a CVCDU.
//
// Each data byte is XORed with its pseudo-noise byte from pn_lfsr. The noise
// sequence restarts after 255 bytes, and whenever new_cvcdu marks the first
// byte of a new CVCDU (1020 bytes = 4 x 255), so each of the four 255-byte
// pieces sees the same sequence. The restarting byte uses the seed 0xFF
// directly while the LFSR loads the byte after it. As in the document, the
// LFSR sits in a module of its own.
// Interface: one byte per valid clock; output one clock later.
module descrambler (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic       new_cvcdu,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_first   // first byte of a CVCDU
);
  logic [7:0] pn;
  logic [7:0] cnt;      // byte position within the 255-byte sequence
  logic       restart;
  logic [7:0] pn_use;

  always_comb begin
    restart = in_valid && (new_cvcdu || cnt == 8'd0);
    pn_use  = restart ? 8'hFF : pn;
  end

  pn_lfsr u_lfsr (.clk, .rst, .restart, .advance(in_valid), .pn);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_first <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data  <= in_data ^ pn_use;
        out_first <= new_cvcdu;
        cnt       <= new_cvcdu ? 8'd1 : (cnt == 8'd254) ? 8'd0 : cnt + 1'b1;
      end
    end
  end
endmodule
