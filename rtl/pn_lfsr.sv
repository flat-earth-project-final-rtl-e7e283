// pn_lfsr: pseudo-noise byte generator for the CVCDU descrambler.
//
// A Fibonacci LFSR for h(x) = x^8 + x^7 + x^5 + x^3 + 1: the bit sequence obeys
// a[n+8] = a[n+7] ^ a[n+5] ^ a[n+3] ^ a[n]. Eight steps are taken per clock
// so that one byte (first bit in the MSB) is available each clock. restart
// loads the all-ones seed (restart together with advance loads the byte that
// follows the seed), giving the byte sequence FF 48 0E C0 9A ... that
// repeats every 255 bytes. The polynomial is the document's; the all-ones seed
// and MSB-first byte order are the usual convention for this randomiser (not
// stated in the document).
// Interface: pn is the current byte; advance moves to the next byte.
module pn_lfsr (
  input  logic       clk,
  input  logic       rst,
  input  logic       restart,
  input  logic       advance,
  output logic [7:0] pn
);
  logic [7:0] st;   // st[7] is the oldest bit, a[n]; st[0] is a[n+7]

  function automatic logic [7:0] next_byte(input logic [7:0] s);
    logic [7:0] r;
    r = s;
    for (int k = 0; k < 8; k++)
      r = {r[6:0], r[7] ^ r[4] ^ r[2] ^ r[0]};
    return r;
  endfunction

  assign pn = st;

  always_ff @(posedge clk) begin
    if (rst)                       st <= 8'hFF;
    else if (restart && advance)   st <= next_byte(8'hFF);
    else if (restart)              st <= 8'hFF;
    else if (advance)              st <= next_byte(st);
  end
endmodule
