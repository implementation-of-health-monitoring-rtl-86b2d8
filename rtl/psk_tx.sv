// psk_tx: binary phase-shift-keying modulator. The carrier from a sine DDS
// goes to a multiplexer together with its negation; the message bit selects
// the carrier unchanged for 0 and the 180-degree shifted carrier for 1:
//   s = A cos(wt)      for bit 0,   s = A cos(wt + pi) = -A cos(wt) for bit 1.
// The output sample is registered, one clock behind the DDS output. The bit
// input may change on any clock (the framer changes it once per bit period).
// Modulation rule and multiplexer structure are the documented ones; sample
// widths and carrier frequency are this design's choices.
module psk_tx #(
  parameter int PHASE_W   = 16,
  parameter int PHASE_INC = 4096,
  parameter int LUT_AW    = 6,
  parameter int AMP_W     = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tx_bit,
  output logic signed [AMP_W-1:0] s_out,
  output logic signed [AMP_W-1:0] carrier
);
  dds #(.PHASE_W(PHASE_W), .PHASE_INC(PHASE_INC), .LUT_AW(LUT_AW), .AMP_W(AMP_W)) u_dds (
    .clk, .rst_n, .sine(carrier));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_out <= '0;
    else        s_out <= tx_bit ? -carrier : carrier;
  end
endmodule
