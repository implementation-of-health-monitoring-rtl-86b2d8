// spi_slave_model: behavioural SPI slave for testbenches (also stands in for
// the PC display). Works in any of the four CPOL/CPHA modes, MSB or LSB
// first. On each SS falling edge it starts sending tx_byte; every received
// byte is appended to rxq. Event driven, so it answers within the same time
// step as the SCK edge.
// Stands in for the devices the description connects over SPI; the event-driven
// model is this testbench's own.
module spi_slave_model (
  input  logic       cpol,
  input  logic       cpha,
  input  logic       dord,
  input  logic       sck,
  input  logic       mosi,
  input  logic       ss_n,
  input  logic [7:0] tx_byte,
  output logic       miso
);
  logic [7:0] rxq [$];
  logic [7:0] txb, rxsr;
  int         rbits = 0, tidx = 0;

  function automatic logic txbit(logic [7:0] b, int k, logic lsb_first);
    return lsb_first ? b[k[2:0]] : b[3'd7 - k[2:0]];
  endfunction

  initial miso = 1'b0;

  always @(negedge ss_n) begin
    txb = tx_byte; rbits = 0; tidx = 0;
    if (!cpha) begin miso = txbit(txb, 0, dord); tidx = 1; end
  end

  always @(sck) begin
    if (!ss_n) begin
      if ((sck != cpol) != cpha) begin        // sampling edge
        rxsr = dord ? {mosi, rxsr[7:1]} : {rxsr[6:0], mosi};
        rbits++;
        if (rbits == 8) begin rxq.push_back(rxsr); rbits = 0; end
      end else if (tidx < 8) begin            // shifting edge
        miso = txbit(txb, tidx, dord);
        tidx++;
      end
    end
  end
endmodule
