// adc8: behavioural model of the 8-bit serial ADC that digitises the sensor
// readout (not synthesizable logic: an analog part, modelled for simulation).
// The input voltage vin (0 .. VREF) is sampled at the falling edge of cs_n and
// quantised to code = floor(vin / VREF * 256), clipped to 0 .. 255. The code
// is shifted out MSB first on miso: bit 7 as soon as cs_n falls, the next bit
// after each falling edge of sclk (SPI mode 0, CPOL = 0, CPHA = 0). miso is
// low while cs_n is high. The 8-bit resolution is the documented one; the
// serial interface and the transfer function are this model's assumptions.
module adc8 #(
  parameter real VREF = 3.3
) (
  input  real  vin,
  input  logic sclk,
  input  logic cs_n,
  output logic miso
);
  logic [7:0] code;
  logic [3:0] idx;

  function automatic logic [7:0] quantise(real v);
    real x;
    x = v / VREF * 256.0;
    if (x <= 0.0)   return 8'd0;
    if (x >= 255.0) return 8'd255;
    return 8'($rtoi(x));
  endfunction

  initial begin code = '0; idx = '0; end

  always @(negedge cs_n) code <= quantise(vin);

  always @(negedge sclk or posedge cs_n) begin
    if (cs_n)            idx <= '0;
    else if (idx < 4'd8) idx <= idx + 4'd1;
  end

  assign miso = (!cs_n && idx < 4'd8) ? code[3'd7 - idx[2:0]] : 1'b0;
endmodule
