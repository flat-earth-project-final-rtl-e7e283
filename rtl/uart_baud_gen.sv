// uart_baud_gen: fractional tick generator for the UART.
//
// A phase accumulator of ACC_W bits advances by INC every clock; each carry
// out is one oversampling tick. With the defaults (ACC_W=17, INC=16*151) the
// tick rate is 100 MHz*2416/2^17 = 16 x 115207 Hz, i.e. 16 samples per bit
// at 115200 baud, because 2^17/151 = 868.03 clocks approximates the exact
// 868.06 clocks per bit. The 2^17/151 ratio is the document's; making the
// accumulator produce the 16x sample tick directly (rather than a 1x baud
// tick subdivided afterwards) is this design's choice.
// Interface: tick is a one-clock pulse. Reset clears the accumulator.
module uart_baud_gen #(
  parameter int unsigned ACC_W = 17,
  parameter int unsigned INC   = 2416
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  logic [ACC_W:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= {1'b0, acc[ACC_W-1:0]} + (ACC_W+1)'(INC);
      tick <= acc[ACC_W];
    end
  end
endmodule
