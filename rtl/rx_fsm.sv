// rx_fsm: controller of the receiver FPGA.
// Frame side: the first byte of each frame (RX_SOF) is the address; a frame
// with another address is ignored. The following bytes are held in a
// one-byte register and handed to the RLE de-compressor (in_first on the
// first of a frame); RX_SPACE_AVAIL is high while that register is free.
// RX_EOF counts the frame as bad when RX_STATUS is not zero, otherwise as
// good if it carried this station's address. The bytes of a frame
// are passed on as they arrive, before its FCS is known.
// Output side: the de-compressed samples are written into the FIFO (a sample
// arriving at a full FIFO is dropped and counted); the controller programs
// the SPI unit once and then sends one FIFO entry per SPI transfer to the PC:
// write SPDR, wait for the SPI interrupt, read SPDR to clear it.
// The controller's role is documented; this sequencing is the design's own.
module rx_fsm
  import hm_pkg::*;
#(
  parameter logic [7:0] ADDR     = 8'h03,
  parameter logic [7:0] SPI_CTRL = 8'b1101_0000   // SPIE SPE MSTR, mode 0, MSB first, /4
) (
  input  logic        clk,
  input  logic        rst_n,
  // HDLC de-framer
  input  logic [7:0]  rx_data,
  input  logic        rx_ready,
  input  logic        rx_sof,
  input  logic        rx_eof,
  input  rx_status_t  rx_status,
  output logic        rx_space_avail,
  // RLE de-compressor input
  output logic        d_valid,
  input  logic        d_ready,
  output logic [7:0]  d_data,
  output logic        d_first,
  // RLE de-compressor output -> FIFO
  input  logic        s_valid,
  input  logic [7:0]  s_data,
  output logic        f_wr,
  output logic [7:0]  f_wdata,
  input  logic        f_full,
  input  logic        f_empty,
  input  logic [7:0]  f_rdata,
  output logic        f_rd,
  // SPI unit register bus
  output spi_reg_e    spi_addr,
  output logic        spi_wr,
  output logic [7:0]  spi_wdata,
  output logic        spi_rd,
  input  logic        spi_irq,
  // status
  output logic [15:0] frames_ok,
  output logic [15:0] frames_bad,
  output logic [15:0] bytes_out,
  output logic [15:0] fifo_drops
);
  typedef enum logic [1:0] {O_INIT, O_IDLE, O_BUSY, O_CLEAR} out_e;
  out_e       os;
  logic       in_frame, first_pending, hold_valid;
  logic [7:0] hold;

  assign rx_space_avail = !hold_valid;
  assign d_valid = hold_valid;
  assign d_data  = hold;
  assign f_wr    = s_valid && !f_full;
  assign f_wdata = s_data;

  always_comb begin
    spi_addr  = SPI_SPDR;
    spi_wr    = 1'b0;
    spi_rd    = 1'b0;
    spi_wdata = f_rdata;
    f_rd      = 1'b0;
    unique case (os)
      O_INIT:  begin spi_addr = SPI_SPCR; spi_wr = 1'b1; spi_wdata = SPI_CTRL; end
      O_IDLE:  if (!f_empty) begin spi_wr = 1'b1; f_rd = 1'b1; end
      O_CLEAR: spi_rd = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      os <= O_INIT; in_frame <= 1'b0; first_pending <= 1'b0; hold_valid <= 1'b0; hold <= '0;
      d_first <= 1'b0; frames_ok <= '0; frames_bad <= '0; bytes_out <= '0; fifo_drops <= '0;
    end else begin
      // frame side
      if (d_valid && d_ready) hold_valid <= 1'b0;
      if (rx_ready) begin
        if (rx_sof) begin
          in_frame      <= (rx_data == ADDR);
          first_pending <= 1'b1;
        end else if (in_frame) begin
          hold          <= rx_data;
          hold_valid    <= 1'b1;
          d_first       <= first_pending;
          first_pending <= 1'b0;
        end
      end
      if (rx_eof) begin
        in_frame <= 1'b0;
        if (rx_status != '0) frames_bad <= frames_bad + 16'd1;
        else if (in_frame)   frames_ok  <= frames_ok + 16'd1;
      end
      if (s_valid && f_full) fifo_drops <= fifo_drops + 16'd1;
      // output side
      unique case (os)
        O_INIT:  os <= O_IDLE;
        O_IDLE:  if (!f_empty) os <= O_BUSY;
        O_BUSY:  if (spi_irq) os <= O_CLEAR;
        O_CLEAR: begin os <= O_IDLE; bytes_out <= bytes_out + 16'd1; end
        default: os <= O_INIT;
      endcase
    end
  end
endmodule
