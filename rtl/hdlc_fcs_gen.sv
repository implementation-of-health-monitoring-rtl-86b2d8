// hdlc_fcs_gen: frame check sequence generator, 16 or 32 bit.
// init presets the CRC register to all ones. While 'update' is high the data
// bit passing through is folded into the CRC (serial, reflected form). While
// 'send' is high the output is the complemented CRC, LSB first, and each
// 'shift' moves to the next FCS bit; otherwise the data bit passes through
// (combinational). sel32 selects CRC-32 (FCS16_32 = 1) over CRC-16.
// The FCS generator is a described unit; the polynomials, preset and
// complemented LSB-first output follow the usual HDLC convention, this design's choice.
module hdlc_fcs_gen
  import hm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sel32,
  input  logic init,
  input  logic data_in,
  input  logic update,
  input  logic send,
  input  logic shift,
  output logic bit_out
);
  logic [31:0] crc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= '1;
    else if (init)   crc <= '1;
    else if (update) crc <= crc_step(crc, data_in, sel32);
    else if (shift)  crc <= {1'b1, crc[31:1]};
  end
  always_comb bit_out = send ? ~crc[0] : data_in;
endmodule
