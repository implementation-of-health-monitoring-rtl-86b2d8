// hdlc_flag_abort_gen: flag, abort and idle pattern generator and the TXD
// output register of the HDLC transmitter. In FA_DATA mode the stuffed data
// bit passes; in FA_FLAG / FA_ABORT mode bit 'idx' (0 first) of 01111110 /
// 11111111 is sent; FA_ONES holds the line at one. TXD changes only on tick
// (TX_CE) and resets to one (idle mark).
// The unit and its opening flag are described; the mode encoding and the
// registered output are this design's choices.
module hdlc_flag_abort_gen
  import hm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tick,
  input  fa_mode_e mode,
  input  logic [2:0] idx,
  input  logic     data_bit,
  output logic     txd
);
  logic nxt;
  always_comb begin
    unique case (mode)
      FA_DATA:  nxt = data_bit;
      FA_FLAG:  nxt = HDLC_FLAG[idx];
      FA_ABORT: nxt = HDLC_ABORT[idx];
      default:  nxt = 1'b1;
    endcase
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    txd <= 1'b1;
    else if (tick) txd <= nxt;
  end
endmodule
