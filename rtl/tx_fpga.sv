// tx_fpga: the transmitter FPGA. The SPI unit reads the 8-bit ADC, the
// controller (tx_fsm) buffers samples in the 2048-bit dual-port RAM, a full
// bank of FRAME_BYTES samples is run-length compressed and the HDLC framer
// sends it as one frame on txd, one bit per BIT_PERIOD clocks (tx_ce marks
// the clock in which txd changes). Everything runs on clk. The block set
// and data flow are the documented ones; the bit-rate counter, the sizes
// and the address byte are this design's choices.
// rst_n is also read by assertions in the SPI unit and the controller.
module tx_fpga
  import hm_pkg::*;
#(
  parameter int         SAMPLE_PERIOD = 2048,
  parameter int         BIT_PERIOD    = 32,
  parameter int         FRAME_BYTES   = 128,
  parameter logic [7:0] ADDR          = 8'h03
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fcs32_sel,
  input  logic        idle_sel,
  // SPI to the ADC
  output logic        adc_sck,
  output logic        adc_mosi,
  input  logic        adc_miso,
  output logic        adc_ss_n,
  // serial output to the modulator
  output logic        txd,
  output logic        tx_ce,
  // status
  output logic [15:0] samples,
  output logic [15:0] dropped,
  output logic [15:0] frames_sent,
  output logic [15:0] underruns
);
  localparam int DEPTH = 256;
  localparam int AW    = $clog2(DEPTH);

  spi_reg_e   spi_addr;
  logic       spi_wr, spi_rd, spi_irq;
  logic [7:0] spi_wdata, spi_rdata;
  logic          ram_we, ram_re;
  logic [AW-1:0] ram_waddr, ram_raddr;
  logic [7:0]    ram_wdata, ram_rdata;
  logic       c_valid, c_ready, c_last;
  logic [7:0] c_data;
  logic       h_valid, h_last, h_load, h_underrun;
  logic [7:0] h_data;
  logic [$clog2(BIT_PERIOD)-1:0] bit_cnt;

  spi_unit u_spi (
    .clk, .rst_n, .addr(spi_addr), .wr_en(spi_wr), .wdata(spi_wdata), .rd_en(spi_rd),
    .rdata(spi_rdata), .irq(spi_irq), .sck(adc_sck), .mosi(adc_mosi), .miso(adc_miso), .ss_n(adc_ss_n),
    .slv_sck(1'b0), .slv_ss_n(1'b1), .slv_mosi(1'b0), .slv_miso(), .slv_miso_oe());

  dual_ram #(.DEPTH(DEPTH), .DW(8)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));

  tx_fsm #(.SAMPLE_PERIOD(SAMPLE_PERIOD), .FRAME_BYTES(FRAME_BYTES), .DEPTH(DEPTH)) u_fsm (
    .clk, .rst_n, .spi_addr, .spi_wr, .spi_wdata, .spi_rd, .spi_rdata, .spi_irq,
    .ram_we, .ram_waddr, .ram_wdata, .ram_re, .ram_raddr, .ram_rdata,
    .c_valid, .c_ready, .c_data, .c_last, .samples, .dropped, .banks_done(frames_sent));

  rle_compressor u_rle (
    .clk, .rst_n, .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data), .in_last(c_last),
    .out_valid(h_valid), .out_ready(h_load), .out_data(h_data), .out_last(h_last));

  // bit-rate clock enable
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bit_cnt <= '0;
    else        bit_cnt <= (bit_cnt == ($clog2(BIT_PERIOD))'(BIT_PERIOD - 1)) ? '0 : bit_cnt + 1'b1;
  end
  assign tx_ce = (bit_cnt == '0);

  hdlc_tx #(.ADDR(ADDR)) u_hdlc (
    .clk, .rst_n, .tx_ce, .tx_data(h_data), .tx_data_valid(h_valid), .tx_eof(h_last),
    .idle_sel, .fcs16_32(fcs32_sel), .txd, .tx_load(h_load), .tx_underrun(h_underrun));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          underruns <= '0;
    else if (h_underrun) underruns <= underruns + 16'd1;
  end
endmodule
