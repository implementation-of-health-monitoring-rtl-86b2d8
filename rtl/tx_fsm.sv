// tx_fsm: controller of the transmitter FPGA. Two cooperating state machines
// share the two banks of the dual-port RAM (FRAME_BYTES samples each):
//  - acquisition: programs the SPI unit once, then every SAMPLE_PERIOD clocks
//    writes a dummy byte to SPDR (which makes the SPI unit select the ADC and
//    clock a conversion result in), waits for the SPI interrupt, reads SPDR
//    and stores the sample in the current bank. A full bank is handed to the
//    streaming side and acquisition moves to the other bank. If that bank is
//    still waiting to be sent, the sample period is skipped and counted in
//    dropped.
//  - streaming: reads a full bank byte by byte (RAM read latency one clock)
//    and offers each sample to the RLE compressor on a valid/ready handshake,
//    in_last on the bank's final sample, so that one bank makes one frame.
// The controller's role is the documented one; the ping-pong banking, the
// sample timer and the drop rule are this design's choices.
// Its assertion reads rst_n in 'disable iff', so lint tools may report rst_n
// as used both synchronously and asynchronously; the logic itself uses it
// only as the asynchronous reset.
module tx_fsm
  import hm_pkg::*;
#(
  parameter int         SAMPLE_PERIOD = 2048,
  parameter int         FRAME_BYTES   = 128,
  parameter int         DEPTH         = 256,
  parameter logic [7:0] SPI_CTRL      = 8'b1101_0000,  // SPIE SPE MSTR, mode 0, MSB first, /4
  localparam int        AW            = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // SPI unit register bus
  output spi_reg_e      spi_addr,
  output logic          spi_wr,
  output logic [7:0]    spi_wdata,
  output logic          spi_rd,
  input  logic [7:0]    spi_rdata,
  input  logic          spi_irq,
  // dual-port RAM
  output logic          ram_we,
  output logic [AW-1:0] ram_waddr,
  output logic [7:0]    ram_wdata,
  output logic          ram_re,
  output logic [AW-1:0] ram_raddr,
  input  logic [7:0]    ram_rdata,
  // RLE compressor input
  output logic          c_valid,
  input  logic          c_ready,
  output logic [7:0]    c_data,
  output logic          c_last,
  // status
  output logic [15:0]   samples,
  output logic [15:0]   dropped,
  output logic [15:0]   banks_done
);
  localparam int IW = $clog2(FRAME_BYTES);

  typedef enum logic [2:0] {A_INIT, A_WAIT, A_START, A_BUSY, A_READ} acq_e;
  typedef enum logic [1:0] {R_IDLE, R_READ, R_WAIT, R_HOLD} rd_e;
  acq_e  acq;
  rd_e   rds;

  logic [31:0]   timer;
  logic          tick;
  logic [1:0]    bank_full;
  logic          wr_bank, rd_bank;
  logic [IW-1:0] wr_idx, rd_idx;

  assign tick = (timer == 32'(SAMPLE_PERIOD - 1));

  // SPI bus: driven by the acquisition machine only
  always_comb begin
    spi_addr  = SPI_SPDR;
    spi_wr    = 1'b0;
    spi_rd    = 1'b0;
    spi_wdata = 8'h00;
    unique case (acq)
      A_INIT:  begin spi_addr = SPI_SPCR; spi_wr = 1'b1; spi_wdata = SPI_CTRL; end
      A_START: begin spi_wr = 1'b1; end
      A_READ:  begin spi_rd = 1'b1; end
      default: ;
    endcase
    ram_we    = (acq == A_READ);
    ram_waddr = AW'(wr_bank) * AW'(FRAME_BYTES) + AW'(wr_idx);
    ram_wdata = spi_rdata;
    ram_re    = (rds == R_READ);
    ram_raddr = AW'(rd_bank) * AW'(FRAME_BYTES) + AW'(rd_idx);
    c_valid   = (rds == R_HOLD);
    c_data    = ram_rdata;
    c_last    = (rd_idx == IW'(FRAME_BYTES - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq <= A_INIT; rds <= R_IDLE; timer <= '0; bank_full <= '0;
      wr_bank <= 1'b0; rd_bank <= 1'b0; wr_idx <= '0; rd_idx <= '0;
      samples <= '0; dropped <= '0; banks_done <= '0;
    end else begin
      timer <= tick ? '0 : timer + 32'd1;
      // acquisition
      unique case (acq)
        A_INIT:  acq <= A_WAIT;
        A_WAIT:  if (tick) begin
                   if (bank_full[wr_bank]) dropped <= dropped + 16'd1;
                   else                    acq <= A_START;
                 end
        A_START: acq <= A_BUSY;
        A_BUSY:  if (spi_irq) acq <= A_READ;
        A_READ:  begin
                   acq     <= A_WAIT;
                   samples <= samples + 16'd1;
                   if (wr_idx == IW'(FRAME_BYTES - 1)) begin
                     wr_idx              <= '0;
                     wr_bank             <= ~wr_bank;
                     bank_full[wr_bank]  <= 1'b1;
                   end else begin
                     wr_idx <= wr_idx + 1'b1;
                   end
                 end
        default: acq <= A_INIT;
      endcase
      // streaming
      unique case (rds)
        R_IDLE: if (bank_full[rd_bank]) rds <= R_READ;
        R_READ: rds <= R_WAIT;
        R_WAIT: rds <= R_HOLD;
        R_HOLD: if (c_ready) begin
                  if (c_last) begin
                    rd_idx             <= '0;
                    rd_bank            <= ~rd_bank;
                    bank_full[rd_bank] <= 1'b0;
                    banks_done         <= banks_done + 16'd1;
                    rds                <= R_IDLE;
                  end else begin
                    rd_idx <= rd_idx + 1'b1;
                    rds    <= R_READ;
                  end
                end
        default: rds <= R_IDLE;
      endcase
    end
  end

  // the two machines never work on the same bank
  a_banks: assert property (@(posedge clk) disable iff (!rst_n)
                            (acq == A_READ && rds != R_IDLE) |-> (wr_bank != rd_bank));
endmodule
