// rs_syndrome: syndrome calculator for RS(255,223).
//
// Thirty-two Horner cells run in parallel while a code word arrives, first
// symbol (r254) first: S_j <- S_j * beta^(112+j) + r, with beta = alpha^11, so
// that after the 255th symbol S_j = r(beta^(112+j)) = r(alpha^(11(112+j))).
// Each multiplication by a constant is a fixed XOR network. in_start loads
// the first symbol instead of accumulating. done pulses for one clock when the
// 255th symbol has been absorbed; syn then holds all syndromes and stays
// until the next code word starts. The structure is the document's.
module rs_syndrome (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic                 in_start,
  input  logic [7:0]           in_data,
  output lrpt_pkg::gf_t        syn [lrpt_pkg::RS_2T],
  output logic                 done
);
  import lrpt_pkg::*;
  logic [7:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      done <= 1'b0;
      for (int j = 0; j < RS_2T; j++) syn[j] <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        for (int j = 0; j < RS_2T; j++)
          syn[j] <= (in_start ? 8'h00 : gf_mul(syn[j], gf_beta(RS_FCR + j))) ^ in_data;
        if (in_start) cnt <= 8'd1;
        else          cnt <= cnt + 1'b1;
        if (!in_start && cnt == 8'(RS_N - 1)) done <= 1'b1;
      end
    end
  end
endmodule
