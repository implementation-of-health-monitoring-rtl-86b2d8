// spi_unit: SPI master with the register set of an 8-bit microcontroller SPI.
// Registers (addr): SPCR = {SPIE, SPE, DORD, MSTR, CPOL, CPHA, SPR1, SPR0},
// SPSR = {SPIF, WCOL, 00000, SPI2X}, SPDR = data. Writing SPDR while idle, with
// SPE and MSTR set, loads the 8-bit shift register, pulls SS low and produces
// eight SCK pulses; SCK idles at CPOL, CPHA picks the sampling edge (0 =
// leading), DORD = 1 sends the LSB first. The SCK rate is the clock divided by
// 2, 4, 8, 16, 32, 64 or 128, chosen by {SPI2X, SPR1, SPR0}. At the end the
// received byte goes to a read buffer (reads are double buffered, writes are
// not), SPIF is set and irq = SPIE & SPIF. Writing SPDR during a transfer is
// ignored and sets WCOL; the transfer continues. Reading or writing SPDR
// clears SPIF and WCOL. rdata is combinational from addr; rd_en marks a read.
// The register fields and their behaviour follow the described SPI; the
// bit positions, the address map and the way SPIF is cleared are this design's
// choices. SS rises one clock after the last SCK edge, so a slave sees the
// last edge while still selected.
// Slave mode (SPE = 1, MSTR = 0) uses the separate slv_* pins: an external
// master selects it with slv_ss_n and clocks slv_sck in the mode set by
// CPOL/CPHA/DORD. The pins pass two-flop synchronisers, so slv_sck must be
// at most clk/8 and slv_miso changes about three clocks after the shifting
// edge; slv_miso_oe is high while selected (for a shared, tri-stated MISO
// line). The byte written to SPDR is sent; after eight bits the received
// byte goes to the read buffer and SPIF is set. Writing SPDR in the middle
// of a byte sets WCOL. Raising slv_ss_n mid-byte restarts the bit count.
// Separate master and slave pins instead of shared bidirectional pins, and
// the synchroniser, are this design's choices.
// Its assertions read rst_n in 'disable iff', so lint tools may report rst_n
// as used both synchronously and asynchronously; the logic itself uses it
// only as the asynchronous reset.
module spi_unit
  import hm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  spi_reg_e   addr,
  input  logic       wr_en,
  input  logic [7:0] wdata,
  input  logic       rd_en,
  output logic [7:0] rdata,
  output logic       irq,
  output logic       sck,
  output logic       mosi,
  input  logic       miso,
  output logic       ss_n,
  // slave-side pins (used when MSTR = 0)
  input  logic       slv_sck,
  input  logic       slv_ss_n,
  input  logic       slv_mosi,
  output logic       slv_miso,
  output logic       slv_miso_oe
);
  logic [7:0] spcr, sr, rdbuf;
  logic       spi2x, spif, wcol, busy, sck_q, mosi_q;
  logic [3:0] edge_cnt;
  logic [6:0] div_cnt, half;
  logic       at_edge, leading, sample_edge;
  logic [7:0] sr_sampled;
  logic       cpol, cpha, dord;

  assign cpol = spcr[SPCR_CPOL];
  assign cpha = spcr[SPCR_CPHA];
  assign dord = spcr[SPCR_DORD];

  // slave side: the external pins are brought into the clock domain by
  // two-flop synchronisers, and SCK edges are found on the synchronised copy
  logic [1:0] ssck_q, sss_q, smosi_q;
  logic       ssck_d, s_sel, s_edge, s_lead, s_sample, s_en;
  logic [2:0] s_bits;
  logic [7:0] s_sampled;
  assign s_en      = spcr[SPCR_SPE] && !spcr[SPCR_MSTR];
  assign s_sel     = s_en && !sss_q[1];
  assign s_edge    = s_sel && (ssck_q[1] != ssck_d);
  assign s_lead    = (ssck_d == cpol);                 // leaving the idle level
  assign s_sample  = s_edge && (s_lead != cpha);
  assign s_sampled = dord ? {smosi_q[1], sr[7:1]} : {sr[6:0], smosi_q[1]};
  assign slv_miso_oe = s_sel;

  // clock divider select: half an SCK period in clocks
  always_comb begin
    unique case ({spi2x, spcr[SPCR_SPR1], spcr[SPCR_SPR0]})
      3'b000: half = 7'd2;    // /4
      3'b001: half = 7'd8;    // /16
      3'b010: half = 7'd32;   // /64
      3'b011: half = 7'd64;   // /128
      3'b100: half = 7'd1;    // /2
      3'b101: half = 7'd4;    // /8
      3'b110: half = 7'd16;   // /32
      default: half = 7'd32;  // /64
    endcase
    at_edge     = busy && (div_cnt == half - 7'd1);
    leading     = (edge_cnt[0] == 1'b0);
    sample_edge = at_edge && (leading != cpha);
    sr_sampled  = dord ? {miso, sr[7:1]} : {sr[6:0], miso};
  end

  logic spdr_wr, spdr_rd;
  assign spdr_wr = wr_en && (addr == SPI_SPDR);
  assign spdr_rd = rd_en && (addr == SPI_SPDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spcr <= '0; spi2x <= 1'b0; spif <= 1'b0; wcol <= 1'b0; busy <= 1'b0;
      sr <= '0; rdbuf <= '0; edge_cnt <= '0; div_cnt <= '0;
      sck_q <= 1'b0; mosi_q <= 1'b0; ss_n <= 1'b1;
      ssck_q <= '0; sss_q <= '1; smosi_q <= '0; ssck_d <= 1'b0; s_bits <= '0; slv_miso <= 1'b0;
    end else begin
      ssck_q  <= {ssck_q[0], slv_sck};
      sss_q   <= {sss_q[0], slv_ss_n};
      smosi_q <= {smosi_q[0], slv_mosi};
      ssck_d  <= ssck_q[1];
      if (wr_en && addr == SPI_SPCR) spcr  <= wdata;
      if (wr_en && addr == SPI_SPSR) spi2x <= wdata[SPSR_SPI2X];
      if (spdr_wr || spdr_rd) begin spif <= 1'b0; wcol <= 1'b0; end

      if (busy) begin
        div_cnt <= at_edge ? 7'd0 : div_cnt + 7'd1;
        if (at_edge) begin
          sck_q    <= ~sck_q;
          edge_cnt <= edge_cnt + 4'd1;
          if (sample_edge) sr <= sr_sampled;
          else             mosi_q <= dord ? sr[0] : sr[7];
          if (edge_cnt == 4'd15) begin
            busy  <= 1'b0;            // SS rises one clock later
            spif  <= 1'b1;
            rdbuf <= sample_edge ? sr_sampled : sr;
          end
        end
        if (spdr_wr) wcol <= 1'b1;        // write collision, data ignored
        if (!spcr[SPCR_SPE]) begin busy <= 1'b0; ss_n <= 1'b1; end
      end else if (s_en) begin
        // slave: shift on the master's SCK while selected
        ss_n <= 1'b1;
        if (!s_sel) s_bits <= '0;
        if (s_sample) begin
          sr     <= s_sampled;
          s_bits <= s_bits + 3'd1;
          if (s_bits == 3'd7) begin
            spif  <= 1'b1;
            rdbuf <= s_sampled;
          end
        end else if (s_edge) begin
          slv_miso <= dord ? sr[0] : sr[7];
        end
        if (spdr_wr) begin
          if (s_sel && s_bits != 3'd0) wcol <= 1'b1;   // mid-byte: write collision
          else begin
            sr <= wdata;
            if (!cpha) slv_miso <= dord ? wdata[0] : wdata[7];
          end
        end
        // CPHA = 0: the first bit must be on MISO as soon as SS falls
        if (!cpha && !sss_q[1] && s_bits == 3'd0 && !spdr_wr && !s_edge)
          slv_miso <= dord ? sr[0] : sr[7];
      end else if (!(spdr_wr && spcr[SPCR_SPE] && spcr[SPCR_MSTR])) begin
        ss_n <= 1'b1;
      end else begin
        busy     <= 1'b1;
        ss_n     <= 1'b0;
        sr       <= wdata;
        edge_cnt <= '0;
        div_cnt  <= '0;
        sck_q    <= cpol;
        mosi_q   <= dord ? wdata[0] : wdata[7];
      end
    end
  end

  always_comb begin
    unique case (addr)
      SPI_SPCR: rdata = spcr;
      SPI_SPSR: rdata = {spif, wcol, 5'b0, spi2x};
      SPI_SPDR: rdata = rdbuf;
      default:  rdata = '0;
    endcase
  end

  assign irq  = spcr[SPCR_SPIE] && spif;
  assign sck  = busy ? sck_q : cpol;
  assign mosi = mosi_q;

  // SCK must rest at CPOL whenever no transfer is running
  a_sck_idle: assert property (@(posedge clk) disable iff (!rst_n) (!busy) |-> (sck == cpol));
  // exactly sixteen SCK edges per transfer: the edge counter never wraps while busy
  a_edges: assert property (@(posedge clk) disable iff (!rst_n) (busy && at_edge && edge_cnt == 4'd15) |=> !busy);
endmodule
