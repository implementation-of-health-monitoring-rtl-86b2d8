// health_monitor_top: the complete short-range wireless health-monitoring
// link in one clock domain.
//   ecg_vin -> adc8 (model) -SPI-> tx_fpga -> txd -> psk_tx -> psk_tx_out
//   psk_rx_in -> psk_rx -> rx_fpga -SPI-> PC display
// The sensor voltage is sampled every SAMPLE_PERIOD clocks; FRAME_BYTES
// samples make one HDLC frame of run-length tokens; each line bit lasts
// BIT_PERIOD clocks on a carrier of 16 clocks per period. The radio channel
// (noise) sits outside: connect psk_tx_out to psk_rx_in directly or through a
// channel model with no delay, since the demodulator's carrier is aligned to
// the modulator's. fcs32_sel picks a 32-bit FCS (both ends), idle_sel picks
// flag (1) or mark (0) idle. The status counters report what each end saw.
// The chain of blocks is the documented one (sensor ADC, transmitter FPGA,
// PSK modulator, channel, PSK demodulator, receiver FPGA, PC display); the
// single clock, the rates and the address byte are this design's choices.
// Internal probe signals left unconnected on purpose: adc_mosi (the ADC has
// no data input), tx_ce (bit strobe), carrier and lpf (modem internals).
// ecg_vin is a real-valued port for the ADC model, so this top is for
// simulation; tx_fpga and rx_fpga are the synthesizable parts.
module health_monitor_top #(
  parameter int SAMPLE_PERIOD = 2048,
  parameter int BIT_PERIOD    = 32,
  parameter int FRAME_BYTES   = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               ecg_vin,
  input  logic              fcs32_sel,
  input  logic              idle_sel,
  output logic signed [7:0] psk_tx_out,
  input  logic signed [9:0] psk_rx_in,
  output logic              pc_sck,
  output logic              pc_mosi,
  input  logic              pc_miso,
  output logic              pc_ss_n,
  output logic [15:0]       samples,
  output logic [15:0]       samples_dropped,
  output logic [15:0]       frames_sent,
  output logic [15:0]       tx_underruns,
  output logic [15:0]       frames_ok,
  output logic [15:0]       frames_bad,
  output logic [15:0]       bytes_to_pc,
  output logic [15:0]       rx_fifo_drops
);
  localparam logic [7:0] ADDR = 8'h03;

  logic adc_sck, adc_mosi, adc_miso, adc_ss_n;
  logic txd, tx_ce, rx_raw;
  logic signed [7:0]  carrier;
  logic signed [21:0] lpf;

  adc8 #(.VREF(3.3)) u_adc (.vin(ecg_vin), .sclk(adc_sck), .cs_n(adc_ss_n), .miso(adc_miso));

  tx_fpga #(.SAMPLE_PERIOD(SAMPLE_PERIOD), .BIT_PERIOD(BIT_PERIOD), .FRAME_BYTES(FRAME_BYTES), .ADDR(ADDR)) u_tx (
    .clk, .rst_n, .fcs32_sel, .idle_sel, .adc_sck, .adc_mosi, .adc_miso, .adc_ss_n,
    .txd, .tx_ce, .samples, .dropped(samples_dropped), .frames_sent, .underruns(tx_underruns));

  psk_tx u_mod (.clk, .rst_n, .tx_bit(txd), .s_out(psk_tx_out), .carrier);

  psk_rx u_demod (.clk, .rst_n, .r_in(psk_rx_in), .lpf_out(lpf), .bit_out(rx_raw));

  rx_fpga #(.BIT_PERIOD(BIT_PERIOD), .ADDR(ADDR)) u_rx (
    .clk, .rst_n, .rx_raw, .fcs32_sel, .pc_sck, .pc_mosi, .pc_miso, .pc_ss_n,
    .frames_ok, .frames_bad, .bytes_out(bytes_to_pc), .fifo_drops(rx_fifo_drops));
endmodule
