// hm_pkg: types and constants shared by the health-monitor link.
// Holds the HDLC flag/abort patterns, the bit-reflected CRC polynomials and their
// good-frame residues (ISO 3309 FCS-16 and FCS-32, bits sent LSB first), the SPI
// register map and bit positions, and the receive status word. The HDLC values
// follow the ISO standard the design names; the register map and status
// encoding are this design's own choices.
package hm_pkg;

  // HDLC framing
  localparam logic [7:0] HDLC_FLAG  = 8'h7E;     // 01111110
  localparam logic [7:0] HDLC_ABORT = 8'hFF;     // eight ones (seven or more abort a frame)

  // Serial CRC, reflected form: crc' = (crc >> 1) ^ ((crc[0] ^ bit) ? POLY : 0)
  localparam logic [31:0] CRC16_POLY    = 32'h0000_8408; // x^16+x^12+x^5+1
  localparam logic [31:0] CRC32_POLY    = 32'hEDB8_8320; // IEEE 802.3
  localparam logic [31:0] CRC16_RESIDUE = 32'h0000_F0B8;
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB_20E3;

  // One serial CRC step; sel32 picks the 32-bit polynomial, otherwise the
  // upper 16 bits are ignored and returned as zero.
  function automatic logic [31:0] crc_step(logic [31:0] crc, logic b, logic sel32);
    logic [31:0] poly;
    logic [31:0] nxt;
    logic [31:0] cur;
    poly = sel32 ? CRC32_POLY : CRC16_POLY;
    cur  = sel32 ? crc : {16'h0, crc[15:0]};
    nxt  = (cur >> 1) ^ (((cur[0] ^ b) != 1'b0) ? poly : 32'h0);
    return nxt;
  endfunction

  // SPI register map
  typedef enum logic [1:0] {
    SPI_SPCR = 2'd0,   // control: SPIE SPE DORD MSTR CPOL CPHA SPR1 SPR0 (bit 7..0)
    SPI_SPSR = 2'd1,   // status : SPIF WCOL - - - - - SPI2X           (bit 7..0)
    SPI_SPDR = 2'd2    // data   : write starts a transfer, read returns the buffer
  } spi_reg_e;

  localparam int SPCR_SPIE = 7, SPCR_SPE = 6, SPCR_DORD = 5, SPCR_MSTR = 4,
                 SPCR_CPOL = 3, SPCR_CPHA = 2, SPCR_SPR1 = 1, SPCR_SPR0 = 0;
  localparam int SPSR_SPIF = 7, SPSR_WCOL = 6, SPSR_SPI2X = 0;

  // HDLC receive end-of-frame status (all zero = good frame)
  typedef struct packed {
    logic overflow;    // a byte arrived while RX_SPACE_AVAIL was low
    logic aborted;     // seven or more ones inside the frame
    logic misaligned;  // bit count between flags not a multiple of 8
    logic fcs_error;   // CRC residue wrong, or frame shorter than the FCS
  } rx_status_t;

  // Flag/abort generator modes
  typedef enum logic [1:0] {
    FA_DATA  = 2'd0,   // pass the stuffed data bit
    FA_FLAG  = 2'd1,
    FA_ABORT = 2'd2,
    FA_ONES  = 2'd3    // idle line held at one
  } fa_mode_e;

endpackage
