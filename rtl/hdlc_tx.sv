// hdlc_tx: HDLC framer (transmitter) built from the five units of its block
// diagram: parallel-to-serial shift register -> FCS generator -> zero
// insertion -> flag/abort generation -> TXD, all sequenced by transmit control.
// Frame on the line: flag 7E, address byte ADDR, data bytes, FCS-16 or FCS-32
// (complemented, LSB first), flag 7E, every field between the flags bit-stuffed.
// Handshake: when idle with TX_DATA_VALID high a frame starts; each data byte
// is taken from TX_DATA in the cycle TX_LOAD is high; TX_EOF marks the last
// byte and must be valid together with it. Each bit lasts one TX_CE period of
// TXC (clk); TXD is registered. Between frames the line carries flags
// (IDLE_SEL = 1) or ones (IDLE_SEL = 0). Port names follow the block diagram;
// the address field and reset polarity are this design's choices.
module hdlc_tx
  import hm_pkg::*;
#(
  parameter logic [7:0] ADDR = 8'h03
) (
  input  logic       clk,            // TXC
  input  logic       rst_n,          // RESET, active low
  input  logic       tx_ce,          // TX_CE
  input  logic [7:0] tx_data,        // TX_DATA[7:0]
  input  logic       tx_data_valid,  // TX_DATA_VALID
  input  logic       tx_eof,         // TX_EOF
  input  logic       idle_sel,       // IDLE_SEL
  input  logic       fcs16_32,       // FCS16_32 (1 = 32-bit FCS)
  output logic       txd,            // TXD
  output logic       tx_load,        // TX_LOAD
  output logic       tx_underrun     // TX_UNDERRUN
);
  logic       p2s_load, p2s_sel_addr, p2s_shift, p2s_bit;
  logic       fcs_sel32, fcs_init, fcs_update, fcs_send, fcs_shift, fcs_bit;
  logic       zi_active, data_phase, zi_bit, stuff;
  fa_mode_e   fa_mode;
  logic [2:0] fa_idx;

  hdlc_p2s u_p2s (
    .clk, .rst_n, .load(p2s_load), .din(p2s_sel_addr ? ADDR : tx_data),
    .shift(p2s_shift), .bit_out(p2s_bit));

  hdlc_fcs_gen u_fcs (
    .clk, .rst_n, .sel32(fcs_sel32), .init(fcs_init), .data_in(p2s_bit),
    .update(fcs_update), .send(fcs_send), .shift(fcs_shift), .bit_out(fcs_bit));

  hdlc_zero_insert u_zi (
    .clk, .rst_n, .tick(tx_ce), .active(zi_active), .bit_in(fcs_bit && data_phase),
    .bit_out(zi_bit), .stuff(stuff));

  hdlc_flag_abort_gen u_fa (
    .clk, .rst_n, .tick(tx_ce), .mode(fa_mode), .idx(fa_idx), .data_bit(zi_bit), .txd(txd));

  hdlc_tx_ctrl u_ctrl (
    .clk, .rst_n, .tick(tx_ce), .idle_sel, .fcs16_32, .tx_data_valid, .tx_eof, .stuff,
    .p2s_load, .p2s_sel_addr, .p2s_shift, .fcs_sel32, .fcs_init, .fcs_update, .fcs_send,
    .fcs_shift, .zi_active, .data_phase, .fa_mode, .fa_idx, .tx_load, .tx_underrun);
endmodule
