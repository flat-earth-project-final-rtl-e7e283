// rs_berlekamp_massey: finds the error locator polynomial Lambda(x).
//
// Berlekamp-Massey builds the shortest LFSR whose first 32 outputs are the
// syndromes S0..S31; its taps are the coefficients of Lambda(x). The FSM
// spends two clocks per syndrome: DISC forms the discrepancy
// d = S_n + sum_{i=1..L} lambda_i S_{n-i}; UPD applies
// Lambda <- Lambda - d/b x^m B(x) and, when 2L <= n, also lengthens the
// register (L <- n+1-L, B <- old Lambda, b <- d, m <- 1). After 32 syndromes
// (64 clocks after start) done pulses with lambda[0..16] and the degree L.
// The document specifies Berlekamp-Massey as an FSM; the two-state split and
// the use of an inverse of b (division form) are this design's choices.
module rs_berlekamp_massey (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  lrpt_pkg::gf_t syn    [lrpt_pkg::RS_2T],
  output lrpt_pkg::gf_t lambda [lrpt_pkg::RS_T+1],
  output logic [5:0]    deg,
  output logic          done
);
  import lrpt_pkg::*;
  localparam int unsigned NL = RS_T + 1;

  typedef enum logic [1:0] {S_IDLE, S_DISC, S_UPD} state_t;
  state_t state;
  gf_t   bpoly [NL];
  gf_t   b, d;
  logic [5:0] n, m;

  gf_t d_comb;
  always_comb begin
    d_comb = syn[n[4:0]];
    for (int i = 1; i < NL; i++)
      if (i <= int'(deg) && i <= int'(n)) d_comb ^= gf_mul(lambda[i], syn[n[4:0] - 5'(i)]);
  end

  gf_t coef;
  gf_t lam_new [NL];
  always_comb begin
    coef = gf_mul(d, gf_inv(b));
    for (int i = 0; i < NL; i++)
      lam_new[i] = (i >= int'(m)) ? lambda[i] ^ gf_mul(coef, bpoly[i - int'(m)]) : lambda[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      deg   <= '0;
      b     <= 8'h01;
      d     <= '0;
      n     <= '0;
      m     <= '0;
      for (int i = 0; i < NL; i++) begin
        lambda[i] <= (i == 0) ? 8'h01 : 8'h00;
        bpoly[i]  <= (i == 0) ? 8'h01 : 8'h00;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < NL; i++) begin
            lambda[i] <= (i == 0) ? 8'h01 : 8'h00;
            bpoly[i]  <= (i == 0) ? 8'h01 : 8'h00;
          end
          deg   <= '0;
          b     <= 8'h01;
          n     <= '0;
          m     <= 6'd1;
          state <= S_DISC;
        end
        S_DISC: begin
          d     <= d_comb;
          state <= S_UPD;
        end
        S_UPD: begin
          if (d == 8'h00) begin
            m <= m + 1'b1;
          end else if (2 * deg <= n) begin
            lambda <= lam_new;
            bpoly  <= lambda;
            deg    <= n + 1'b1 - deg;
            b      <= d;
            m      <= 6'd1;
          end else begin
            lambda <= lam_new;
            m      <= m + 1'b1;
          end
          if (n == 6'(RS_2T - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            n     <= n + 1'b1;
            state <= S_DISC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
