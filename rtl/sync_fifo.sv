// sync_fifo: synchronous first-in first-out buffer, 128 x 8 = 1024 bits by
// default, between the receiver's de-compressor and its SPI output.
// Show-ahead: rdata is the oldest entry whenever empty is low; rd pops it.
// A write when full, or a read when empty, is ignored. count gives the fill
// level. The 1024-bit size is the documented one; organisation and
// show-ahead behaviour are this design's choices.
// Its assertion reads rst_n in 'disable iff', so lint tools may report rst_n
// as used both synchronously and asynchronously; the logic itself uses it
// only as the asynchronous reset.
module sync_fifo #(
  parameter int DEPTH = 128,
  parameter int DW    = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];
  always_ff @(posedge clk) if (do_wr) mem[wp] <= wdata;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
