// hdlc_flag_abort_det: flag and abort detector of the HDLC receiver.
// Every received bit (tick = RX_CE) enters an 8-bit window; the window is
// compared with the flag 01111110 and its newest seven bits with the abort
// pattern (seven ones). The window doubles as an 8-bit delay: the bit that
// leaves it is the data bit handed on, so a flag is recognised before any of
// its bits reach the de-framer. Outputs are registered and valid in the cycle
// after the tick, marked by tick_q.
// Comparing the input and the register with the flag and abort patterns every
// clock is as described; using the window as the 8-bit data delay is this
// design's own.
module hdlc_flag_abort_det
  import hm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic rxd,
  output logic tick_q,
  output logic bit_q,
  output logic flag_q,
  output logic abort_q
);
  logic [7:0] win;
  logic [7:0] win_nxt;
  assign win_nxt = {rxd, win[7:1]};   // newest bit at the top
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0; tick_q <= 1'b0; bit_q <= 1'b0; flag_q <= 1'b0; abort_q <= 1'b0;
    end else begin
      tick_q <= tick;
      if (tick) begin
        win     <= win_nxt;
        bit_q   <= win[0];
        flag_q  <= (win_nxt == HDLC_FLAG);
        abort_q <= (win_nxt[7:1] == 7'h7F);
      end else begin
        flag_q  <= 1'b0;
        abort_q <= 1'b0;
      end
    end
  end
endmodule
