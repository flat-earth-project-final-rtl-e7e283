// rs_reinterleaver: merges the four corrected message words into a VCDU.
//
// Each of the four RS decoders delivers a 223-symbol message word. They are
// written into one half of a ping-pong buffer (each lane switches halves after
// its word), and once all four lanes have filled a half, the half is read out
// interleaved, symbol i of word A, B, C, D in turn, which restores the byte
// order of the CVCDU without its parity: an 892-byte VCDU. out_fail is set
// on the first byte when any of the four words was uncorrectable. The
// re-interleaving order is the document's; the ping-pong buffer is this
// design's choice, needed because the decoders finish at different times.
module rs_reinterleaver #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned K     = 223
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [DEPTH-1:0] in_valid,
  input  logic [DEPTH-1:0] in_last,
  input  logic [DEPTH-1:0] in_fail,
  input  logic [7:0]       in_data [DEPTH],
  output logic             out_valid,
  output logic             out_first,
  output logic             out_last,
  output logic [7:0]       out_data,
  output logic             out_fail
);
  localparam int unsigned N  = DEPTH * K;
  localparam int unsigned KW = $clog2(K);
  localparam int unsigned NW = $clog2(N);
  localparam int unsigned LW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [7:0]       mem  [2][DEPTH][K];
  logic [KW-1:0]    widx [DEPTH];
  logic [DEPTH-1:0] wbank;
  logic [DEPTH-1:0] full [2];
  logic [1:0]       bad;
  logic             rbank, reading;
  logic [NW-1:0]    ridx;

  always_ff @(posedge clk) begin
    for (int l = 0; l < DEPTH; l++)
      if (in_valid[l]) mem[wbank[l]][l][widx[l]] <= in_data[l];
  end

  logic [LW-1:0] rlane;
  logic [KW-1:0] rsym;
  assign rlane = LW'(ridx % NW'(DEPTH));
  assign rsym  = KW'(ridx / NW'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      wbank     <= '0;
      full[0]   <= '0;
      full[1]   <= '0;
      bad       <= '0;
      rbank     <= 1'b0;
      reading   <= 1'b0;
      ridx      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      out_fail  <= 1'b0;
      for (int l = 0; l < DEPTH; l++) widx[l] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      for (int l = 0; l < DEPTH; l++) begin
        if (in_valid[l]) begin
          if (in_last[l]) begin
            widx[l]  <= '0;
            wbank[l] <= ~wbank[l];
            full[wbank[l]][l] <= 1'b1;
            if (in_fail[l]) bad[wbank[l]] <= 1'b1;
          end else widx[l] <= widx[l] + 1'b1;
        end
      end
      if (!reading) begin
        if (&full[rbank]) begin
          reading <= 1'b1;
          ridx    <= '0;
        end
      end else begin
        out_valid <= 1'b1;
        out_first <= (ridx == '0);
        out_last  <= (ridx == NW'(N - 1));
        out_data  <= mem[rbank][rlane][rsym];
        out_fail  <= bad[rbank];
        if (ridx == NW'(N - 1)) begin
          reading     <= 1'b0;
          full[rbank] <= '0;
          bad[rbank]  <= 1'b0;
          rbank       <= ~rbank;
        end else ridx <= ridx + 1'b1;
      end
    end
  end
endmodule
