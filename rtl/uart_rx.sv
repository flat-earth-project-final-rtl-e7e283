// uart_rx: 8N1 UART receiver with 16x oversampling.
//
// The line is synchronised by two flip-flops. In IDLE a low level (the falling
// edge of the start bit) moves the FSM to START, which waits 8 sample ticks to
// reach the middle of the start bit and checks the line is still low (a glitch
// returns to IDLE). DATA then samples every 16 ticks, LSB first, until eight
// bits are held; STOP samples once more after 16 ticks and, only if the line
// is high, pulses data_valid for one clock with the byte on data_out. A low
// stop bit is a framing error: the byte is discarded. This follows the
// receiver FSM of the document; the LSB-first bit order is the usual UART
// convention (not stated there).
// Interface: tick is the 16x oversampling strobe from uart_baud_gen.
module uart_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       rx,
  output logic [7:0] data_out,
  output logic       data_valid,
  output logic       frame_error
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;
  state_t      state;
  logic [1:0]  sync;
  logic [3:0]  tcnt;
  logic [2:0]  bcnt;
  logic [7:0]  shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync        <= 2'b11;
      state       <= S_IDLE;
      tcnt        <= '0;
      bcnt        <= '0;
      shreg       <= '0;
      data_out    <= '0;
      data_valid  <= 1'b0;
      frame_error <= 1'b0;
    end else begin
      sync        <= {sync[0], rx};
      data_valid  <= 1'b0;
      frame_error <= 1'b0;
      unique case (state)
        S_IDLE: if (!sync[1]) begin
          state <= S_START;
          tcnt  <= '0;
        end
        S_START: if (tick) begin
          if (tcnt == 4'd7) begin
            tcnt  <= '0;
            bcnt  <= '0;
            state <= sync[1] ? S_IDLE : S_DATA;
          end else tcnt <= tcnt + 1'b1;
        end
        S_DATA: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            shreg <= {sync[1], shreg[7:1]};
            bcnt  <= bcnt + 1'b1;
            if (bcnt == 3'd7) state <= S_STOP;
          end
        end
        S_STOP: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            state <= S_IDLE;
            if (sync[1]) begin
              data_out   <= shreg;
              data_valid <= 1'b1;
            end else frame_error <= 1'b1;
          end
        end
      endcase
    end
  end
endmodule
