// dds: direct digital synthesizer producing the sine carrier of the BPSK
// modem. A PHASE_W-bit phase accumulator advances by PHASE_INC every clock;
// its top LUT_AW bits address a sine table of 2^LUT_AW entries,
// round((2^(AMP_W-1) - 1) * sin(2*pi*k / 2^LUT_AW)), computed at elaboration.
// The carrier period is 2^PHASE_W / PHASE_INC clocks (16 by default). The
// output is registered: 'sine' shows the phase held before the last clock.
// The DDS as carrier source is the documented structure; its sizes are this
// design's choices.
module dds #(
  parameter int PHASE_W   = 16,
  parameter int PHASE_INC = 4096,
  parameter int LUT_AW    = 6,
  parameter int AMP_W     = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic signed [AMP_W-1:0] sine
);
  typedef logic signed [AMP_W-1:0] lut_t [2**LUT_AW];

  function automatic lut_t make_lut();
    lut_t t;
    real  amp, pi;
    pi  = 3.14159265358979323846;
    amp = real'((2 ** (AMP_W - 1)) - 1);
    for (int k = 0; k < 2 ** LUT_AW; k++)
      t[k] = AMP_W'($rtoi($floor(amp * $sin(2.0 * pi * real'(k) / real'(2 ** LUT_AW)) + 0.5)));
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [PHASE_W-1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      sine  <= '0;
    end else begin
      phase <= phase + PHASE_W'(PHASE_INC);
      sine  <= LUT[phase[PHASE_W-1 -: LUT_AW]];
    end
  end
endmodule
