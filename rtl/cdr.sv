// cdr: clock and data recovery for the demodulated bit stream. The input is
// the demodulator's decision at the sample clock, about BIT_PERIOD samples
// per bit. A phase counter restarts at every transition of the input, and
// the input is sampled when the counter reaches the middle of the bit; the
// counter keeps running through runs of equal bits. Outputs: bit_out with a
// one-clock strobe bit_ce per recovered bit (to RXD / RX_CE of the HDLC
// receiver), and resync, a pulse at every transition used. The HDLC bit
// stuffing bounds runs of ones, so the counter is corrected often. The
// recovery function is documented; this transition-reset method is this
// design's own.
module cdr #(
  parameter int BIT_PERIOD = 32,
  localparam int CW        = $clog2(BIT_PERIOD + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic bit_out,
  output logic bit_ce,
  output logic resync
);
  logic          din_d;
  logic [CW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_d <= 1'b0; cnt <= '0; bit_out <= 1'b1; bit_ce <= 1'b0; resync <= 1'b0;
    end else begin
      din_d  <= din;
      bit_ce <= 1'b0;
      resync <= 1'b0;
      if (din != din_d) begin
        cnt    <= CW'(1);
        resync <= 1'b1;
      end else begin
        cnt <= (cnt == CW'(BIT_PERIOD - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(BIT_PERIOD / 2)) begin
          bit_out <= din;
          bit_ce  <= 1'b1;
        end
      end
    end
  end
endmodule
