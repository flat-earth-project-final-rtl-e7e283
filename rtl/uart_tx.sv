// uart_tx: 8N1 UART transmitter.
//
// In IDLE the line is high and ready is set. A start pulse latches data_in;
// the FSM then drives the start bit (low) for one bit time, the eight data
// bits LSB first, one bit time each, and a high stop bit, and returns to IDLE
// where a new byte may follow immediately. One bit time is 16 ticks of the
// same 16x strobe the receiver uses. The frame format (1 start, 8 data,
// 1 stop, no parity) is the document's; LSB-first order is the UART
// convention.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       start,
  input  logic [7:0] data_in,
  output logic       ready,
  output logic       tx
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;
  state_t     state;
  logic [3:0] tcnt;
  logic [2:0] bcnt;
  logic [7:0] shreg;

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      tcnt  <= '0;
      bcnt  <= '0;
      shreg <= '0;
      tx    <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          tx <= 1'b1;
          if (start) begin
            shreg <= data_in;
            state <= S_START;
            tcnt  <= '0;
            tx    <= 1'b0;
          end
        end
        S_START: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            state <= S_DATA;
            bcnt  <= '0;
            tx    <= shreg[0];
          end
        end
        S_DATA: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            bcnt  <= bcnt + 1'b1;
            shreg <= {1'b0, shreg[7:1]};
            if (bcnt == 3'd7) begin
              state <= S_STOP;
              tx    <= 1'b1;
            end else tx <= shreg[1];
          end
        end
        S_STOP: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
