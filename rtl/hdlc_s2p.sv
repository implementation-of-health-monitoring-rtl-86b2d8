// hdlc_s2p: 8-bit serial-to-parallel converter of the HDLC receiver, with its
// own bit counter. Bits arrive LSB first; on the eighth shift 'byte_done' is
// high and 'byte_out' holds the completed byte (both combinational, in the
// cycle of the shift). bit_cnt is the number of bits held (0..7).
// The shift register's oldest bit sr[0] is dropped as the byte completes,
// so it is never read. The byte framing follows the described converter
// ('loads a byte ... and has its own counter'); the rest is this design's.
module hdlc_s2p (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       shift,
  input  logic       bit_in,
  output logic [7:0] byte_out,
  output logic       byte_done,
  output logic [2:0] bit_cnt
);
  logic [7:0] sr;
  assign byte_out  = {bit_in, sr[7:1]};
  assign byte_done = shift && (bit_cnt == 3'd7);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; bit_cnt <= '0;
    end else if (clear) begin
      bit_cnt <= '0;
    end else if (shift) begin
      sr      <= byte_out;
      bit_cnt <= bit_cnt + 3'd1;
    end
  end
endmodule
