// psk_rx: coherent BPSK demodulator. The received samples are multiplied by
// a local carrier from an identical DDS, delayed one clock to line up with
// the modulator's output register, so the local carrier is in phase when
// both DDS leave reset together and the channel adds no delay. The product
// goes through a low-pass filter, a moving sum over LPF_TAPS samples (one
// carrier period by default, which cancels the double-frequency term), and
// the sign of the filter output gives the bit (negative = 180 degrees = 1),
// a non-return-to-zero stream at the sample rate. Latency: about
// LPF_TAPS/2 + 3 clocks. Multiplier, low-pass filter and decision are the
// documented chain; the filter type, widths and the coherent carrier are this
// design's choices.
module psk_rx #(
  parameter int PHASE_W   = 16,
  parameter int PHASE_INC = 4096,
  parameter int LUT_AW    = 6,
  parameter int AMP_W     = 8,
  parameter int IN_W      = 10,
  parameter int LPF_TAPS  = 16,
  localparam int PW       = IN_W + AMP_W,
  localparam int SW       = PW + $clog2(LPF_TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [IN_W-1:0] r_in,
  output logic signed [SW-1:0] lpf_out,
  output logic                 bit_out
);
  logic signed [AMP_W-1:0] lo, lo_d;
  logic signed [PW-1:0]    prod;
  logic signed [PW-1:0]    taps [LPF_TAPS];

  dds #(.PHASE_W(PHASE_W), .PHASE_INC(PHASE_INC), .LUT_AW(LUT_AW), .AMP_W(AMP_W)) u_dds (
    .clk, .rst_n, .sine(lo));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_d    <= '0;
      prod    <= '0;
      lpf_out <= '0;
      bit_out <= 1'b0;
      for (int i = 0; i < LPF_TAPS; i++) taps[i] <= '0;
    end else begin
      lo_d    <= lo;
      prod    <= PW'(r_in) * PW'(lo_d);
      taps[0] <= prod;
      for (int i = 1; i < LPF_TAPS; i++) taps[i] <= taps[i-1];
      lpf_out <= lpf_out + SW'(prod) - SW'(taps[LPF_TAPS-1]);
      bit_out <= (lpf_out < 0);
    end
  end
endmodule
