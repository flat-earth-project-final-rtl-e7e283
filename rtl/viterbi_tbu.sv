// viterbi_tbu: traceback unit with survivor memory and output stack.
//
// Every decoder step writes one column of 64 decision bits into the survivor
// memory (S entries) at the write pointer, which walks through the memory
// towards lower addresses. Two traceback pointers walk the other way, one
// column per step. Pointer p starts at the write pointer whenever the step
// counter (mod X+B) equals p*B, from state 0: comparing all metrics to find
// the best state is avoided because all survivor paths merge within about 28
// steps. The first X reads only trace back; the next B reads also push the
// decoded bit (the newest bit of the state, i.e. its MSB) onto the pointer's
// stack. After X+B reads the pointer meets the write pointer again, hands its
// stack to the output register, which shifts the bits out oldest first at one
// bit per clock, and starts over. The two pointers are B steps apart, so B
// decoded bits leave for every B input pairs.
// S=120, X=30, B=30 and the two pointers come from the document. The memory
// is one array with one write and two read ports; on an FPGA it maps to the
// two duplicated dual-port RAMs the document describes.
// Timing: a bit decided at step t leaves between X+1 and X+2B steps later.
module viterbi_tbu #(
  parameter int unsigned S      = 120,
  parameter int unsigned X      = 30,
  parameter int unsigned B      = 30,
  parameter int unsigned STATES = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step,          // write one decision column
  input  logic [STATES-1:0] dec,
  output logic              out_valid,
  output logic              out_bit,
  output logic              overflow       // output register reloaded while still draining
);
  localparam int unsigned AW = $clog2(S);
  localparam int unsigned CW = $clog2(X + B + 1);
  localparam int unsigned SB = $clog2(STATES);

  logic [STATES-1:0] mem [S];
  logic [AW-1:0]     wp;
  logic [CW-1:0]     cnt;               // step counter mod X+B
  logic [AW-1:0]     ta  [2];
  logic [SB-1:0]     ts  [2];
  logic [CW-1:0]     ph  [2];
  logic [B-1:0]      stk [2];
  logic [B-1:0]      obuf;
  logic [$clog2(B+1)-1:0] ocnt;

  // one traceback step for each pointer
  logic [SB-1:0] nstate [2];
  logic          dbit   [2];
  logic [AW-1:0] nta    [2];
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      dbit[p]   = ts[p][SB-1];
      nstate[p] = {ts[p][SB-2:0], mem[ta[p]][ts[p]]};
      nta[p]    = (ta[p] == AW'(S - 1)) ? '0 : ta[p] + 1'b1;
    end
  end

  initial assert (S == 2 * (X + B) && X == B)
    else $error("viterbi_tbu: two pointers need S = 2(X+B) and X = B");

  always_ff @(posedge clk) begin
    if (step) mem[wp] <= dec;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp        <= '0;
      cnt       <= '0;
      obuf      <= '0;
      ocnt      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      overflow  <= 1'b0;
      for (int p = 0; p < 2; p++) begin
        ta[p]  <= '0;
        ts[p]  <= '0;
        ph[p]  <= '0;
        stk[p] <= '0;
      end
    end else begin
      overflow  <= 1'b0;
      out_valid <= 1'b0;
      if (ocnt != '0) begin
        out_valid <= 1'b1;
        out_bit   <= obuf[0];
        obuf      <= {1'b0, obuf[B-1:1]};
        ocnt      <= ocnt - 1'b1;
      end
      if (step) begin
        wp  <= (wp == '0) ? AW'(S - 1) : wp - 1'b1;
        cnt <= (cnt == CW'(X + B - 1)) ? '0 : cnt + 1'b1;
        for (int p = 0; p < 2; p++) begin
          logic [B-1:0] s_next;
          s_next = stk[p];
          if (ph[p] != '0) begin
            ta[p] <= nta[p];
            ts[p] <= nstate[p];
            ph[p] <= ph[p] + 1'b1;
            if (ph[p] > CW'(X)) s_next = {stk[p][B-2:0], dbit[p]};
            stk[p] <= s_next;
          end
          if (cnt == CW'(p * B)) begin
            if (ph[p] == CW'(X + B)) begin
              obuf <= s_next;
              ocnt <= ($clog2(B+1))'(B);
              if (ocnt > 1) overflow <= 1'b1;
            end
            ta[p] <= wp;
            ts[p] <= '0;
            ph[p] <= CW'(1);
          end
        end
      end
    end
  end
endmodule
