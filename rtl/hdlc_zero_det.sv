// hdlc_zero_det: zero detection of the HDLC receiver. Counts consecutive ones
// among the data bits (tick); a zero arriving after five ones is reported on
// 'zero' (combinational) as an inserted zero for the controller to drop.
// 'clear' empties the counter at frame boundaries.
// Flagging the zero after five ones is as described; the saturating counter
// is this design's.
module hdlc_zero_det (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic tick,
  input  logic bit_in,
  output logic zero
);
  logic [2:0] ones;
  assign zero = (ones == 3'd5) && !bit_in;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ones <= '0;
    else if (clear)  ones <= '0;
    else if (tick)   ones <= bit_in ? ((ones == 3'd7) ? ones : ones + 3'd1) : 3'd0;
  end
endmodule
