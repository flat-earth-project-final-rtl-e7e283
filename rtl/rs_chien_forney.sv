// rs_chien_forney: Chien search (error locator) and Forney algorithm (error
// evaluator) for RS(255,223).
//
// Registers hold lambda_j * x^j and omega_j * x^j for x = beta^m; every clock
// each is multiplied by its constant beta^j, so the sums give Lambda(x) and
// Omega(x) at the next point. Steps run m = 1..255, which visits the symbol
// positions i = 255-m, i.e. r254 first: exactly the order in which the code
// word was received, so the results can be streamed into the corrector. When
// Lambda(x) = 0, x is the inverse of an error location X and the magnitude
// is Y = X^(1-112) Omega(X^-1) / Lambda'(X^-1). In GF(2^m) the derivative
// keeps only odd terms, Lambda'(x) = Lambda_odd(x)/x, so the design computes
// Y = x^112 Omega(x) / Lambda_odd(x), with x^112 kept in one more register and
// one inverter. Search and formula are the document's; the register-per-
// coefficient structure is the usual Chien arrangement.
// Interface: start loads lambda/omega; for 255 clocks out_valid carries
// err_val (the error value for the next received symbol, 0 if none); done
// pulses with the last step, and nroots is the number of roots found.
module rs_chien_forney (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  lrpt_pkg::gf_t lambda [lrpt_pkg::RS_T+1],
  input  lrpt_pkg::gf_t omega  [lrpt_pkg::RS_T],
  output logic          out_valid,
  output lrpt_pkg::gf_t err_val,
  output logic          done,
  output logic [8:0]    nroots
);
  import lrpt_pkg::*;
  localparam int unsigned NL = RS_T + 1;

  gf_t  lr [NL];
  gf_t  orr [RS_T];
  gf_t  xp;
  logic [8:0] m;
  logic running;

  gf_t lam_x, lam_odd, om_x, mag;
  always_comb begin
    lam_x   = 8'h00;
    lam_odd = 8'h00;
    om_x    = 8'h00;
    for (int j = 0; j < NL; j++) begin
      lam_x ^= lr[j];
      if (j % 2 == 1) lam_odd ^= lr[j];
    end
    for (int j = 0; j < RS_T; j++) om_x ^= orr[j];
    mag = gf_mul(gf_mul(xp, om_x), gf_inv(lam_odd));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      m         <= '0;
      out_valid <= 1'b0;
      err_val   <= '0;
      done      <= 1'b0;
      nroots    <= '0;
      xp        <= '0;
      for (int j = 0; j < NL; j++)   lr[j]  <= '0;
      for (int j = 0; j < RS_T; j++) orr[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        running <= 1'b1;
        m       <= 9'd1;
        nroots  <= '0;
        xp      <= gf_beta(RS_FCR);
        for (int j = 0; j < NL; j++)   lr[j]  <= gf_mul(lambda[j], gf_beta(j));
        for (int j = 0; j < RS_T; j++) orr[j] <= gf_mul(omega[j], gf_beta(j));
      end else if (running) begin
        out_valid <= 1'b1;
        err_val   <= (lam_x == 8'h00) ? mag : 8'h00;
        if (lam_x == 8'h00) nroots <= nroots + 1'b1;
        for (int j = 0; j < NL; j++)   lr[j]  <= gf_mul(lr[j], gf_beta(j));
        for (int j = 0; j < RS_T; j++) orr[j] <= gf_mul(orr[j], gf_beta(j));
        xp <= gf_mul(xp, gf_beta(RS_FCR));
        m  <= m + 1'b1;
        if (m == 9'(RS_N)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end
endmodule
