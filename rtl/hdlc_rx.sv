// hdlc_rx: HDLC de-framer (receiver) built from the units of its block
// diagram: flag and abort detection, zero detection, 16/32-bit FCS checker,
// 8-bit serial-to-parallel converter and receiver control.
// RXD is sampled on RXC (clk) when RX_CE is high. Received bytes, address
// byte first, appear on RX_DATA with a one-cycle RX_READY pulse (RX_SOF on the
// first byte of a frame); the FCS bytes are checked and not delivered. RX_EOF
// pulses once per frame with RX_STATUS (all zero for a good frame), at the
// earliest in the cycle of the last RX_READY. A byte arriving while
// RX_SPACE_AVAIL is low is lost and flagged as overflow. The receiver latency
// is eight bit periods (the flag window) plus two clocks.
// The set of units is the described one; the wiring between them, the port
// timing and the status encoding are this design's.
module hdlc_rx
  import hm_pkg::*;
(
  input  logic       clk,             // RXC
  input  logic       rst_n,           // RESET, active low
  input  logic       rx_ce,           // RX_CE
  input  logic       rxd,             // RXD
  input  logic       fcs16_32,        // FCS16_32 (1 = 32-bit FCS)
  input  logic       rx_space_avail,  // RX_SPACE_AVAIL
  output logic [7:0] rx_data,         // RX_DATA[7:0]
  output logic       rx_ready,        // RX_READY
  output logic       rx_sof,          // RX_SOF
  output logic       rx_eof,          // RX_EOF
  output rx_status_t rx_status        // RX_STATUS
);
  logic       tick, dbit, flag, abort_det;
  logic       zero, crc_ok, byte_done;
  logic [7:0] byte_v;
  logic [2:0] bit_cnt;
  logic       data_tick, bit_en, frame_clear, sel32;

  hdlc_flag_abort_det u_fad (
    .clk, .rst_n, .tick(rx_ce), .rxd, .tick_q(tick), .bit_q(dbit), .flag_q(flag), .abort_q(abort_det));

  hdlc_zero_det u_zd (
    .clk, .rst_n, .clear(frame_clear), .tick(data_tick), .bit_in(dbit), .zero);

  hdlc_fcs_check u_fcs (
    .clk, .rst_n, .sel32, .init(frame_clear), .update(bit_en), .bit_in(dbit), .ok(crc_ok));

  hdlc_s2p u_sp (
    .clk, .rst_n, .clear(frame_clear), .shift(bit_en), .bit_in(dbit),
    .byte_out(byte_v), .byte_done, .bit_cnt);

  hdlc_rx_ctrl u_ctrl (
    .clk, .rst_n, .fcs16_32, .rx_space_avail, .tick, .flag, .abort_det, .zero, .crc_ok,
    .byte_done, .byte_in(byte_v), .bit_cnt, .data_tick, .bit_en, .frame_clear, .sel32,
    .rx_data, .rx_ready, .rx_sof, .rx_eof, .rx_status);
endmodule
