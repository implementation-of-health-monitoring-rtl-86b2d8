// hdlc_rx_ctrl: receiver control of the HDLC de-framer.
// States: hunting for a flag, or inside a frame. After each flag the next
// eight bits leaving the detector window are the flag itself and are skipped.
// Inside a frame every bit not marked as an inserted zero goes to the FCS
// checker and the serial-to-parallel converter. Completed bytes wait in a
// small pipe as deep as the FCS (2 or 4 bytes), so the FCS is never delivered:
// a byte is handed out (RX_READY, RX_SOF on the first) only when a newer one
// arrives. A flag after data ends the frame: RX_EOF pulses with RX_STATUS
// (fcs error or frame too short, misaligned bit count, overflow); it may
// coincide with the last RX_READY. An abort inside a frame ends it with the
// abort bit set and returns to hunting. All outputs are registered.
// The controller's role is described only in general; the states, the FCS
// pipe and the status rules are this design's own.
module hdlc_rx_ctrl
  import hm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fcs16_32,
  input  logic       rx_space_avail,
  // from the flag/abort detector
  input  logic       tick,
  input  logic       flag,
  input  logic       abort_det,
  // from zero detection, FCS checker and serial-to-parallel converter
  input  logic       zero,
  input  logic       crc_ok,
  input  logic       byte_done,
  input  logic [7:0] byte_in,
  input  logic [2:0] bit_cnt,
  // to the units
  output logic       data_tick,   // a bit of the frame (zero detection counts it)
  output logic       bit_en,      // a de-stuffed data bit (FCS, S/P)
  output logic       frame_clear,
  output logic       sel32,
  // to the user
  output logic [7:0] rx_data,
  output logic       rx_ready,
  output logic       rx_sof,
  output logic       rx_eof,
  output rx_status_t rx_status
);
  logic       in_frame;
  logic [3:0] skip;
  logic       bits_seen, delivered, first, overflow;
  logic [7:0] pipe [4];
  logic [2:0] pcount;
  logic [2:0] nf;
  logic       deliver, ends, aborts;
  logic [2:0] cnt_after;

  always_comb begin
    nf          = sel32 ? 3'd4 : 3'd2;
    data_tick   = tick && in_frame && (skip == 4'd0);
    bit_en      = data_tick && !zero;
    deliver     = byte_done && (pcount == nf);
    ends        = tick && in_frame && flag && (bits_seen || bit_en);
    aborts      = tick && in_frame && !flag && abort_det;
    frame_clear = tick && flag;
    cnt_after   = bit_en ? bit_cnt + 3'd1 : bit_cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame <= 1'b0; skip <= '0; bits_seen <= 1'b0; delivered <= 1'b0;
      first <= 1'b1; overflow <= 1'b0; pcount <= '0; sel32 <= 1'b0;
      for (int i = 0; i < 4; i++) pipe[i] <= '0;
      rx_data <= '0; rx_ready <= 1'b0; rx_sof <= 1'b0; rx_eof <= 1'b0; rx_status <= '0;
    end else begin
      rx_ready <= 1'b0;
      rx_sof   <= 1'b0;
      rx_eof   <= 1'b0;
      if (tick && skip != 4'd0) skip <= skip - 4'd1;
      if (bit_en) bits_seen <= 1'b1;
      // byte from the S/P converter into the FCS pipe
      if (byte_done) begin
        if (deliver) begin
          if (rx_space_avail) begin
            rx_data  <= pipe[0];
            rx_ready <= 1'b1;
            rx_sof   <= first;
            first    <= 1'b0;
          end else begin
            overflow <= 1'b1;
          end
          delivered <= 1'b1;
          for (int i = 0; i < 3; i++) pipe[i] <= pipe[i+1];
          pipe[2'(nf - 3'd1)] <= byte_in;
        end else begin
          pipe[pcount[1:0]] <= byte_in;
          pcount       <= pcount + 3'd1;
        end
      end
      // frame boundaries
      if (tick && flag) begin
        if (ends) begin
          rx_eof <= 1'b1;
          rx_status.fcs_error  <= !crc_ok || !(delivered || deliver);
          rx_status.misaligned <= (cnt_after != 3'd0);
          rx_status.aborted    <= 1'b0;
          rx_status.overflow   <= overflow || (deliver && !rx_space_avail);
        end
        in_frame  <= 1'b1;
        skip      <= 4'd8;
        sel32     <= fcs16_32;
        bits_seen <= 1'b0; delivered <= 1'b0; first <= 1'b1; overflow <= 1'b0;
        pcount    <= '0;
      end else if (aborts) begin
        if (bits_seen) begin
          rx_eof    <= 1'b1;
          rx_status <= '{overflow: overflow, aborted: 1'b1, misaligned: 1'b0, fcs_error: 1'b0};
        end
        in_frame  <= 1'b0;
        bits_seen <= 1'b0; delivered <= 1'b0; first <= 1'b1; overflow <= 1'b0;
        pcount    <= '0;
      end
    end
  end
endmodule
