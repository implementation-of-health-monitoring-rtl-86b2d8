// rx_fpga: the receiver FPGA. The clock and data recovery unit turns the
// demodulated sample stream into bits with a bit strobe; the HDLC de-framer
// rebuilds and checks the frames; the controller (rx_fsm) strips the address
// byte and feeds the RLE de-compressor; the samples pass through the 1024-bit
// FIFO and leave one per SPI transfer towards the PC display. One clock.
// The block set and data flow are the documented ones; the sizes and the
// address are this design's choices.
// Left unconnected on purpose: resync (clock recovery's re-alignment pulse,
// a probe point), d_err (token format errors; the FCS already covers the
// line), f_count (FIFO level) and the SPI read data (the display returns
// nothing of use). rst_n is also read by the SPI unit's and FIFO's assertions.
module rx_fpga
  import hm_pkg::*;
#(
  parameter int         BIT_PERIOD = 32,
  parameter logic [7:0] ADDR       = 8'h03
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_raw,       // demodulator decision, one per clock
  input  logic        fcs32_sel,
  // SPI to the PC display
  output logic        pc_sck,
  output logic        pc_mosi,
  input  logic        pc_miso,
  output logic        pc_ss_n,
  // status
  output logic [15:0] frames_ok,
  output logic [15:0] frames_bad,
  output logic [15:0] bytes_out,
  output logic [15:0] fifo_drops
);
  logic       rxd, rx_ce, resync;
  logic [7:0] rx_data;
  logic       rx_ready, rx_sof, rx_eof, rx_space_avail;
  rx_status_t rx_status;
  logic       d_valid, d_ready, d_first, s_valid, d_err;
  logic [7:0] d_data, s_data;
  logic       f_wr, f_rd, f_full, f_empty;
  logic [7:0] f_wdata, f_rdata;
  logic [7:0] f_count;
  spi_reg_e   spi_addr;
  logic       spi_wr, spi_rd, spi_irq;
  logic [7:0] spi_wdata, spi_rdata;

  cdr #(.BIT_PERIOD(BIT_PERIOD)) u_cdr (
    .clk, .rst_n, .din(rx_raw), .bit_out(rxd), .bit_ce(rx_ce), .resync);

  hdlc_rx u_hdlc (
    .clk, .rst_n, .rx_ce, .rxd, .fcs16_32(fcs32_sel), .rx_space_avail,
    .rx_data, .rx_ready, .rx_sof, .rx_eof, .rx_status);

  rle_decompressor u_rle (
    .clk, .rst_n, .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data), .in_first(d_first),
    .out_valid(s_valid), .out_ready(1'b1), .out_data(s_data), .err(d_err));

  sync_fifo #(.DEPTH(128), .DW(8)) u_fifo (
    .clk, .rst_n, .wr(f_wr), .wdata(f_wdata), .rd(f_rd), .rdata(f_rdata),
    .empty(f_empty), .full(f_full), .count(f_count));

  spi_unit u_spi (
    .clk, .rst_n, .addr(spi_addr), .wr_en(spi_wr), .wdata(spi_wdata), .rd_en(spi_rd),
    .rdata(spi_rdata), .irq(spi_irq), .sck(pc_sck), .mosi(pc_mosi), .miso(pc_miso), .ss_n(pc_ss_n),
    .slv_sck(1'b0), .slv_ss_n(1'b1), .slv_mosi(1'b0), .slv_miso(), .slv_miso_oe());

  rx_fsm #(.ADDR(ADDR)) u_fsm (
    .clk, .rst_n, .rx_data, .rx_ready, .rx_sof, .rx_eof, .rx_status, .rx_space_avail,
    .d_valid, .d_ready, .d_data, .d_first, .s_valid, .s_data,
    .f_wr, .f_wdata, .f_full, .f_empty, .f_rdata, .f_rd,
    .spi_addr, .spi_wr, .spi_wdata, .spi_rd, .spi_irq,
    .frames_ok, .frames_bad, .bytes_out, .fifo_drops);
endmodule
