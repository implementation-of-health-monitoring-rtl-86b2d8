// dual_ram: simple dual-port RAM, 256 x 8 = 2048 bits by default, as the
// transmitter's sample buffer. Port A writes, port B reads; the read data is
// registered (valid the cycle after re). A read and a write to the same
// address in one cycle return the old contents. The 2048-bit size is the
// documented one; the 256 x 8 organisation and the read latency are this
// design's choices.
module dual_ram #(
  parameter int DEPTH = 256,
  parameter int DW    = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
