// diff_decoder: differential decoder for the deinterleaved soft symbols.
//
// The I and Q channels are decoded separately: the decoded bit is the XOR of
// the current and the previous received bit of the same channel. On soft
// values (positive meaning 1) this is a sign change of the current value
// whenever the previous value of that channel was non-negative. The channel of
// a symbol is taken from the parity of its deinterleaver branch (even = I).
// The document states only that the symbols are differentially decoded;
// per-channel decoding, the soft sign rule and the reset value (previous
// bit 0) are this design's choices.
// Interface: one symbol in, one out, one clock later.
module diff_decoder (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic              in_q,      // 1: symbol belongs to the Q channel
  input  logic signed [7:0] in_data,
  output logic              out_valid,
  output logic              out_q,
  output logic signed [7:0] out_data
);
  logic signed [7:0] prev [2];

  function automatic logic signed [7:0] neg8(input logic signed [7:0] v);
    return (v == -8'sd128) ? 8'sd127 : -v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      prev[0]   <= -8'sd1;
      prev[1]   <= -8'sd1;
      out_valid <= 1'b0;
      out_q     <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        prev[in_q] <= in_data;
        out_q      <= in_q;
        out_data   <= (prev[in_q] >= 0) ? neg8(in_data) : in_data;
      end
    end
  end
endmodule
