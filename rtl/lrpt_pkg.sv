// lrpt_pkg: constants and helper functions shared by the LRPT receive chain.
//
// Holds the convolutional code (K=7, generators 1111001 and 1011011), the
// unique words used for frame synchronisation, and the GF(2^8) arithmetic of
// the RS(255,223) code. The field is generated by F(x)=x^8+x^7+x^2+x+1 with
// alpha = 0x02; the code roots are beta^(112+j), j=0..31, where
// beta = alpha^11. All functions are pure combinational logic (XOR/AND
// networks once the loops are unrolled) and are usable in constant
// expressions.
package lrpt_pkg;

  // ---------------- convolutional code ----------------
  localparam int unsigned CONV_K = 7;
  localparam logic [6:0]  CONV_G1 = 7'b1111001; // I channel, MSB taps the newest bit
  localparam logic [6:0]  CONV_G2 = 7'b1011011; // Q channel
  localparam int unsigned VIT_STATES = 64;

  // encoder output pair for "input bit u entering a register that holds state s"
  // (s[5] is the most recent previous bit)
  function automatic logic [1:0] conv_out(input logic u, input logic [5:0] s);
    logic [6:0] r;
    r = {u, s};
    return {^(r & CONV_G1), ^(r & CONV_G2)};
  endfunction

  // ---------------- unique words ----------------
  localparam logic [7:0]  UW_DEINT = 8'h27;        // precedes each 72-bit interleaved block
  localparam logic [31:0] UW_CADU  = 32'h1ACFFC1D; // CADU attached sync marker

  // ---------------- GF(2^8) ----------------
  typedef logic [7:0] gf_t;
  localparam logic [8:0] GF_POLY  = 9'h187;        // x^8+x^7+x^2+x+1
  localparam int unsigned RS_N    = 255;
  localparam int unsigned RS_K    = 223;
  localparam int unsigned RS_2T   = 32;
  localparam int unsigned RS_T    = 16;
  localparam int unsigned RS_FCR  = 112;           // first consecutive root exponent (of beta)
  localparam int unsigned RS_GEN  = 11;            // beta = alpha^11

  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ GF_POLY[7:0]) : (aa << 1);
    end
    return p;
  endfunction

  function automatic gf_t gf_pow(input gf_t a, input int unsigned n);
    gf_t r;
    gf_t b;
    int unsigned e;
    r = 8'h01;
    b = a;
    e = n % 255;
    for (int i = 0; i < 8; i++) begin
      if (e[i]) r = gf_mul(r, b);
      b = gf_mul(b, b);
    end
    return r;
  endfunction

  // alpha^n
  function automatic gf_t gf_alpha(input int unsigned n);
    return gf_pow(8'h02, n);
  endfunction

  // beta^n with beta = alpha^11
  function automatic gf_t gf_beta(input int unsigned n);
    return gf_alpha((RS_GEN * (n % 255)) % 255);
  endfunction

  // multiplicative inverse (a^254); 0 maps to 0
  function automatic gf_t gf_inv(input gf_t a);
    return gf_pow(a, 254);
  endfunction

endpackage
