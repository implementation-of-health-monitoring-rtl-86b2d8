// rle_decompressor: expands the run tokens of rle_compressor back into
// 8-bit samples. Each input byte carries two 4-bit tokens {bit value,
// run length - 1}, low nibble first. Runs are laid into the sample from bit 0
// upward; when 8 bits are filled the sample is output. in_first marks the
// first byte of a frame and discards any unfinished sample, which is how the
// padding token at the end of a frame is dropped; a run that would overfill
// a sample is a format error, counted on err and the sample discarded.
// Timing: two clocks per input byte (one per token); both sides use
// valid/ready. Decoding follows the described RLE; the token format is this
// design's choice.
module rle_decompressor (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_first,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       err
);
  logic [7:0] tok_byte;
  logic [1:0] ntok;       // tokens left in tok_byte
  logic [7:0] acc;
  logic [3:0] fill;

  logic [3:0] token, len;
  logic       out_free, step;
  logic [7:0] run_mask, acc_nxt;
  assign token    = ntok[1] ? tok_byte[3:0] : tok_byte[7:4];
  assign len      = {1'b0, token[2:0]} + 4'd1;
  assign out_free = !out_valid || out_ready;
  assign step     = (ntok != 2'd0) && out_free;
  assign in_ready = (ntok == 2'd0) || (ntok == 2'd1 && step);
  always_comb begin
    run_mask = 8'((9'h1 << len) - 9'h1) << fill[2:0];
    acc_nxt  = token[3] ? (acc | run_mask) : (acc & ~run_mask);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_byte <= '0; ntok <= '0; acc <= '0; fill <= '0;
      out_valid <= 1'b0; out_data <= '0; err <= 1'b0;
    end else begin
      err <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (step) begin
        ntok <= ntok - 2'd1;
        if (fill + len > 4'd8) begin
          err  <= 1'b1;
          fill <= '0;
        end else if (fill + len == 4'd8) begin
          out_valid <= 1'b1;
          out_data  <= acc_nxt;
          fill      <= '0;
        end else begin
          acc  <= acc_nxt;
          fill <= fill + len;
        end
      end
      if (in_valid && in_ready) begin
        tok_byte <= in_data;
        ntok     <= 2'd2;
        if (in_first) fill <= '0;
      end
    end
  end
endmodule
