// lrpt_tb_pkg: reference models for the LRPT testbenches.
//
// Independent of the RTL: GF(2^8) arithmetic through exp/log tables built by
// repeated multiplication by alpha (field polynomial x^8+x^7+x^2+x+1), an
// RS(255,223) systematic encoder for the code with roots alpha^(11(112+j)),
// the K=7 convolutional encoder, the CCSDS pseudo-noise sequence from its bit
// recurrence, and helpers for error polynomials.
package lrpt_tb_pkg;

  int unsigned gexp [512];
  int unsigned glog [256];
  int unsigned gpoly [33];   // generator polynomial, gpoly[k] = coefficient of x^k
  bit          ready = 0;

  function automatic void tb_init();
    int unsigned x;
    if (ready) return;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x;
      glog[x] = i;
      x = x << 1;
      if (x & 'h100) x = x ^ 'h187;
    end
    for (int i = 255; i < 512; i++) gexp[i] = gexp[i - 255];
    glog[0] = 0;
    // g(x) = prod (x + beta^(112+j))
    for (int k = 0; k < 33; k++) gpoly[k] = 0;
    gpoly[0] = 1;
    for (int j = 0; j < 32; j++) begin
      int unsigned root;
      root = gexp[(11 * (112 + j)) % 255];
      for (int k = 32; k >= 0; k--)
        gpoly[k] = (k > 0 ? gpoly[k-1] : 0) ^ mul(gpoly[k], root);
    end
    ready = 1;
  endfunction

  function automatic int unsigned mul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  function automatic int unsigned inv(int unsigned a);
    return gexp[(255 - glog[a]) % 255];
  endfunction

  // beta^n, beta = alpha^11
  function automatic int unsigned beta(int n);
    int m;
    m = (11 * n) % 255;
    if (m < 0) m += 255;
    return gexp[m];
  endfunction

  // systematic encoding; cw[0] is sent first (= c254), cw[254] last (= c0)
  function automatic void rs_encode(input byte unsigned msg [223], output byte unsigned cw [255]);
    int unsigned par [32];
    int unsigned fb;
    tb_init();
    for (int k = 0; k < 32; k++) par[k] = 0;
    for (int i = 0; i < 223; i++) begin
      fb = msg[i] ^ par[31];
      for (int k = 31; k > 0; k--) par[k] = par[k-1] ^ mul(fb, gpoly[k]);
      par[0] = mul(fb, gpoly[0]);
      cw[i] = msg[i];
    end
    for (int k = 0; k < 32; k++) cw[223 + k] = byte'(par[31 - k]);
  endfunction

  // syndrome j of a received word (cw[0] = r254), direct evaluation
  function automatic int unsigned syndrome(input byte unsigned cw [255], input int j);
    int unsigned s;
    s = 0;
    for (int i = 0; i < 255; i++)
      s ^= mul(cw[254 - i], beta((112 + j) * i));
    return s;
  endfunction

  // conv encoder output for input bit u with 6-bit history h (h[5] newest)
  function automatic bit [1:0] conv(bit u, bit [5:0] h);
    bit [6:0] r;
    r = {u, h};
    return {^(r & 7'b1111001), ^(r & 7'b1011011)};
  endfunction

  // pseudo-noise byte k (0..254) of the descrambler sequence
  function automatic byte unsigned pn_byte(int k);
    bit a [2048];
    byte unsigned v;
    for (int n = 0; n < 8; n++) a[n] = 1;
    for (int n = 0; n + 8 < 8 * 255 + 8; n++) a[n+8] = a[n+7] ^ a[n+5] ^ a[n+3] ^ a[n];
    v = 0;
    for (int b = 0; b < 8; b++) v = {v[6:0], a[8*k + b]};
    return v;
  endfunction

  function automatic byte signed sat8(int v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return byte'(v);
  endfunction

endpackage
