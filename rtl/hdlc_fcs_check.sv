// hdlc_fcs_check: 16/32-bit FCS checker of the HDLC receiver. The CRC register
// (preset to ones by 'init') takes every de-stuffed bit of the frame, the
// received FCS included; a good frame leaves the fixed residue (F0B8 for
// CRC-16, DEBB20E3 for CRC-32). 'ok' compares the residue including the bit
// being taken in this cycle, so it is valid in the same cycle as the last bit.
// The checker's role (compare the running CRC with the expected value) is the
// described one; the residue test and the CRC-16/CRC-32 choice are this design's.
module hdlc_fcs_check
  import hm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sel32,
  input  logic init,
  input  logic update,
  input  logic bit_in,
  output logic ok
);
  logic [31:0] crc, crc_nxt;
  always_comb begin
    crc_nxt = update ? crc_step(crc, bit_in, sel32) : crc;
    ok      = sel32 ? (crc_nxt == CRC32_RESIDUE) : (crc_nxt[15:0] == CRC16_RESIDUE[15:0]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '1;
    else if (init)  crc <= '1;
    else            crc <= crc_nxt;
  end
endmodule
