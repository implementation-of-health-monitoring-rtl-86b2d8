// hdlc_zero_insert: bit stuffer. Counts consecutive ones sent from the data
// region; once five have gone out, the next bit slot carries an inserted zero
// and 'stuff' tells the controller to hold the upstream bit for one slot.
// 'active' marks the data region (address, data, FCS, and the slot before the
// closing flag); outside it the counter is cleared. Updates on tick (TX_CE).
// Bit stuffing after five ones is the described function; the stall handshake
// (stuff) is this design's.
module hdlc_zero_insert (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic active,
  input  logic bit_in,
  output logic bit_out,
  output logic stuff
);
  logic [2:0] ones;
  assign stuff   = active && (ones == 3'd5);
  assign bit_out = stuff ? 1'b0 : bit_in;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ones <= '0;
    else if (!active)           ones <= '0;
    else if (tick) begin
      if (stuff || !bit_in)     ones <= '0;
      else                      ones <= ones + 3'd1;
    end
  end
endmodule
