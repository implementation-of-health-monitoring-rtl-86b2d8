// hdlc_tx_ctrl: transmit-control state machine of the HDLC framer.
// Sequence per frame: opening flag, address byte, data bytes (each fetched
// from TX_DATA with a TX_LOAD pulse at the last bit of the previous byte),
// FCS (16 or 32 bits, chosen at the start of the frame), closing flag, then
// idle. A byte boundary with no TX_DATA_VALID before TX_EOF is an underrun:
// TX_UNDERRUN pulses and an abort (eight ones) is sent. Every bit slot is a
// 'tick' (TX_CE); when the bit stuffer inserts a zero ('stuff') the slot does
// not advance the controller. The ordering follows the HDLC frame; state
// names and the underrun rule are this design's own.
module hdlc_tx_ctrl
  import hm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       idle_sel,
  input  logic       fcs16_32,
  input  logic       tx_data_valid,
  input  logic       tx_eof,
  input  logic       stuff,
  output logic       p2s_load,
  output logic       p2s_sel_addr,
  output logic       p2s_shift,
  output logic       fcs_sel32,
  output logic       fcs_init,
  output logic       fcs_update,
  output logic       fcs_send,
  output logic       fcs_shift,
  output logic       zi_active,
  output logic       data_phase,
  output fa_mode_e   fa_mode,
  output logic [2:0] fa_idx,
  output logic       tx_load,
  output logic       tx_underrun
);
  typedef enum logic [2:0] {S_IDLE, S_OPEN, S_ADDR, S_DATA, S_FCS, S_CLOSE, S_ABORT} state_e;
  state_e     state;
  logic [4:0] cnt;
  logic       last;      // the byte in the shift register is the last one
  logic       sel32_q;

  logic adv, byte_end, need_byte, fcs_end;
  always_comb begin
    adv        = tick && !stuff;
    byte_end   = (cnt[2:0] == 3'd7);
    need_byte  = adv && byte_end && ((state == S_ADDR) || (state == S_DATA && !last));
    fcs_end    = (cnt == (sel32_q ? 5'd31 : 5'd15));
    data_phase = (state == S_ADDR) || (state == S_DATA) || (state == S_FCS);
    zi_active  = data_phase || (state == S_CLOSE && cnt == 5'd0);
    p2s_shift  = adv && ((state == S_ADDR) || (state == S_DATA));
    fcs_update = p2s_shift;
    fcs_send   = (state == S_FCS);
    fcs_shift  = adv && (state == S_FCS);
    fcs_init   = tick && (state == S_OPEN);
    fcs_sel32  = sel32_q;
    tx_load    = need_byte && tx_data_valid;
    tx_underrun= need_byte && !tx_data_valid;
    p2s_sel_addr = (state == S_OPEN);
    p2s_load   = tx_load || (tick && state == S_OPEN && byte_end);
    fa_idx     = cnt[2:0];
    unique case (state)
      S_IDLE:  fa_mode = idle_sel ? FA_FLAG : FA_ONES;
      S_OPEN:  fa_mode = FA_FLAG;
      S_CLOSE: fa_mode = stuff ? FA_DATA : FA_FLAG;
      S_ABORT: fa_mode = FA_ABORT;
      default: fa_mode = FA_DATA;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      last    <= 1'b0;
      sel32_q <= 1'b0;
    end else if (adv) begin
      cnt <= cnt + 5'd1;
      unique case (state)
        S_IDLE: begin
          cnt[4:3] <= 2'b00;
          if (byte_end && tx_data_valid) begin
            state   <= S_OPEN;
            sel32_q <= fcs16_32;
          end
        end
        S_OPEN:  if (byte_end) begin state <= S_ADDR; cnt <= '0; end
        S_ADDR, S_DATA: if (byte_end) begin
          cnt <= '0;
          if (state == S_DATA && last) state <= S_FCS;
          else if (tx_data_valid) begin state <= S_DATA; last <= tx_eof; end
          else state <= S_ABORT;
        end
        S_FCS:   if (fcs_end) begin state <= S_CLOSE; cnt <= '0; end
        S_CLOSE: if (byte_end) begin state <= S_IDLE; cnt <= '0; end
        S_ABORT: if (byte_end) begin state <= S_IDLE; cnt <= '0; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
