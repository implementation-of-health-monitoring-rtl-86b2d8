// hdlc_p2s: 8-bit parallel-to-serial shift register of the HDLC transmitter.
// A load writes a byte; each shift moves it one place right so that bit 0 is
// sent first, as HDLC sends octets LSB first. bit_out is always the current
// bit 0. Load wins over shift in the same cycle. Single clock, active-low reset.
// The transmit register capturing data on the clock edge is described; the
// load/shift interface is this design's.
module hdlc_p2s (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] din,
  input  logic       shift,
  output logic       bit_out
);
  logic [7:0] sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {1'b0, sr[7:1]};
  end
  assign bit_out = sr[0];
endmodule
