// awgn_channel: simulation model of the radio channel between modulator and
// demodulator: adds white noise of standard deviation 'sigma' (in sample
// units) to every sample and saturates to OUT_W bits. The noise is the sum of
// twelve uniform variates minus six, a close approximation of a Gaussian.
// The output is combinational from the input plus the noise drawn at the last
// clock edge, so the channel adds no delay.
// The additive white Gaussian noise channel is the described one; the
// sum-of-uniforms approximation is this model's own choice.
module awgn_channel #(
  parameter int IN_W  = 8,
  parameter int OUT_W = 10
) (
  input  logic                     clk,
  input  real                      sigma,
  input  logic signed [IN_W-1:0]   s_in,
  output logic signed [OUT_W-1:0]  r_out
);
  int noise = 0;
  always @(posedge clk) begin
    real g;
    g = -6.0;
    for (int i = 0; i < 12; i++) g += real'($urandom % 65536) / 65536.0;
    noise <= $rtoi(g * sigma);
  end
  always_comb begin
    int v;
    v = int'(s_in) + noise;
    if (v >  (2 ** (OUT_W - 1)) - 1) v = (2 ** (OUT_W - 1)) - 1;
    if (v < -(2 ** (OUT_W - 1)))     v = -(2 ** (OUT_W - 1));
    r_out = OUT_W'(v);
  end
endmodule
