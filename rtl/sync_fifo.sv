// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH entries of WIDTH bits in a circular memory with read and write
// pointers and an occupancy count. A write when full is dropped and flagged
// on overflow; rd_data shows the oldest entry whenever empty is low, and a
// read pops it. Helper that decouples the VCDU burst from the slow UART
// transmitter.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             overflow
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic             do_wr, do_rd;

  assign empty   = (cnt == '0);
  assign rd_data = mem[rp];
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (cnt != (AW+1)'(DEPTH) || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && !do_wr;
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(rd_en && empty))
    else $error("sync_fifo: read while empty");
endmodule
