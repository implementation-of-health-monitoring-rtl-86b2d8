// rle_compressor: bit-level run-length encoder for 8-bit samples.
// Each sample is scanned from bit 0 upward and cut into runs of equal bits;
// 11110011 becomes the runs 1x2, 0x2, 1x4. A run is coded as a 4-bit token
// {bit value, run length - 1}, so runs of 1 to 8 fit. Tokens are packed two
// per output byte, the earlier token in the low nibble. Runs never cross a
// sample boundary, so a decoder knows a sample is complete when its run
// lengths add up to 8. in_last marks the last sample of a frame: its final
// token closes the frame (out_last), and an odd token count is padded with
// the token 0000, which a decoder drops as an incomplete sample.
// Timing: one token per clock; a sample with k runs takes k clocks. Both
// sides use valid/ready handshakes. Run counting follows the described RLE;
// the token format, packing and padding are this design's choices.
module rle_compressor (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last
);
  logic [7:0] smp;        // sample being scanned
  logic       smp_last;
  logic [3:0] pos;        // next bit to scan, 8 = sample done
  logic       busy;
  logic [3:0] lo;         // buffered low nibble
  logic       have_lo;
  logic       pad_pending;

  // length of the run starting at pos
  logic [3:0] run_len;
  logic       run_bit;
  always_comb begin
    run_bit = smp[pos[2:0]];
    run_len = 4'd1;
    for (int k = 1; k < 8; k++)
      if ((pos + 4'(k) < 4'd8) && (run_len == 4'(k)) && (smp[pos[2:0] + 3'(k)] == run_bit))
        run_len = 4'(k + 1);
  end

  logic [3:0] token;
  logic       tok_final, out_free, emit;
  assign token     = {run_bit, 3'(run_len - 4'd1)};
  assign tok_final = (pos + run_len == 4'd8);
  assign out_free  = !out_valid || out_ready;
  // a token is taken when it goes to the low nibble, or completes a byte
  // and the output register is free
  assign emit      = busy && !pad_pending && (!have_lo || out_free);
  assign in_ready  = (!busy || (emit && tok_final)) && !pad_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp <= '0; smp_last <= 1'b0; pos <= '0; busy <= 1'b0;
      lo <= '0; have_lo <= 1'b0; pad_pending <= 1'b0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (pad_pending && out_free) begin
        out_valid   <= 1'b1;
        out_data    <= {4'h0, lo};
        out_last    <= 1'b1;
        have_lo     <= 1'b0;
        pad_pending <= 1'b0;
      end
      if (emit) begin
        pos <= pos + run_len;
        if (!have_lo) begin
          lo      <= token;
          have_lo <= 1'b1;
          if (tok_final && smp_last) pad_pending <= 1'b1;
        end else begin
          out_valid <= 1'b1;
          out_data  <= {token, lo};
          out_last  <= tok_final && smp_last;
          have_lo   <= 1'b0;
        end
        if (tok_final) busy <= 1'b0;
      end
      if (in_valid && in_ready) begin
        smp      <= in_data;
        smp_last <= in_last;
        pos      <= '0;
        busy     <= 1'b1;
      end
    end
  end
endmodule
