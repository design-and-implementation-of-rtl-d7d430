// sync_fifo - byte FIFO on a dual-port RAM, used as the 64-byte transmit and
// receive FIFOs of the physical attachment interface.
//
// One write port and one read port in the same clock domain. The read data
// is the word at the head (first-word-fall-through): rdata is valid while
// empty = 0 and rd_en pops it at the clock edge. A write when full and a read
// when empty are ignored (the control logic never issues them; assertions
// flag it). count gives the fill level, 0..DEPTH. flush empties the FIFO.
// The depth of 64 bytes is the document's.
module sync_fifo #(
  parameter int DEPTH = 64,
  parameter int W     = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,
  input  logic                   wr_en,
  input  logic [W-1:0]           wdata,
  input  logic                   rd_en,
  output logic [W-1:0]           rdata,
  output logic                   full,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (flush) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end

  a_no_overflow  : assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !flush));
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty && !flush));

endmodule
