// rs_deinterleaver: splits a CVCDU into its four Reed-Solomon code words.
//
// The transmitter interleaves four RS(255,223) code words symbol by symbol
// (depth 4). A 2-bit counter, cleared by in_first, sends byte n of the CVCDU
// to code word n mod 4; the first four bytes of a CVCDU are the first symbols
// of the four code words and are flagged with out_start. This is the
// document's counter-based scheme.
// Interface: out_valid is one-hot over the four lanes, one clock after input.
module rs_deinterleaver #(
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic             in_first,  // first byte of a CVCDU
  input  logic [7:0]       in_data,
  output logic [DEPTH-1:0] out_valid,
  output logic             out_start, // first symbol of each code word
  output logic [7:0]       out_data
);
  localparam int unsigned LW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [LW-1:0] lane;
  logic [8:0]    sym;    // symbol index within the code words

  always_ff @(posedge clk) begin
    if (rst) begin
      lane      <= '0;
      sym       <= '0;
      out_valid <= '0;
      out_start <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= '0;
      if (in_valid) begin
        logic [LW-1:0] l;
        logic [8:0]    s;
        l = in_first ? '0 : lane;
        s = in_first ? '0 : sym;
        out_valid[l] <= 1'b1;
        out_start    <= (s == '0);
        out_data     <= in_data;
        lane <= (l == LW'(DEPTH - 1)) ? '0 : l + 1'b1;
        sym  <= (l == LW'(DEPTH - 1)) ? s + 1'b1 : s;
      end
    end
  end
endmodule
