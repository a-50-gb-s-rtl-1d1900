// asl_cal_monitor: reads received calibration frames of a serial link.
//
// Once the receiver has frame sync, a frame whose first byte has the idle
// bit set is a calibration frame. From its control byte the monitor keeps the
// far end's report on the other link of the pair (byte sync and frame sync of
// the link this chip transmits on). During the fifth to eighth bytes the far
// transmitter sends its timing bytes with its clock shifted by 90 degrees,
// so each received bit is a sample taken at a bit transition. A bit that
// equals the 01010101 pattern counts as a vote for "clock early", any other
// bit as a vote for "clock late"; after the eighth byte the majority of the
// 32 votes sets early_o or late_o (neither on a tie). These two bits are
// returned to the far end in this chip's own control bytes. The vote polarity
// and the tie rule are this design's choices. Byte clock domain, synchronous
// active-high reset; vote_o pulses for one cycle when a vote is taken.
module asl_cal_monitor
  import xbar_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              clr_i,
  input  logic [BYTE_W-1:0] rx_byte_i,
  input  logic [BPOS_W-1:0] pos_i,        // byte position of rx_byte_i
  input  logic              frame_sync_i,
  output logic              early_o,
  output logic              late_o,
  output logic              vote_o,
  output logic              far_byte_sync_o,
  output logic              far_frame_sync_o
);

  ctrl_byte_t ctrl;
  logic       cal_q;      // current frame is a calibration frame
  logic [5:0] early_cnt;  // votes for early, out of 32
  logic [3:0] match;      // bits of this byte equal to the timing pattern

  assign ctrl = ctrl_byte_t'(rx_byte_i);

  always_comb begin
    match = '0;
    for (int b = 0; b < BYTE_W; b++)
      match += 4'(rx_byte_i[b] == TIMING_BYTE[b]);
  end

  always_ff @(posedge clk) begin
    if (rst || clr_i) begin
      cal_q            <= 1'b0;
      early_cnt        <= '0;
      early_o          <= 1'b0;
      late_o           <= 1'b0;
      vote_o           <= 1'b0;
      far_byte_sync_o  <= 1'b0;
      far_frame_sync_o <= 1'b0;
    end else begin
      vote_o <= 1'b0;
      if (pos_i == BPOS_W'(CAL_CTRL_POS)) begin
        cal_q     <= frame_sync_i && ctrl.idle;
        early_cnt <= '0;
        if (frame_sync_i && ctrl.idle) begin
          far_byte_sync_o  <= ctrl.byte_sync;
          far_frame_sync_o <= ctrl.frame_sync;
        end
      end else if (cal_q && pos_i >= BPOS_W'(CAL_VOTE_FIRST)
                         && pos_i <= BPOS_W'(CAL_VOTE_LAST)) begin
        early_cnt <= early_cnt + 6'(match);
      end else if (cal_q && pos_i == BPOS_W'(FRAME_BYTES - 1)) begin
        early_o <= early_cnt > 6'd16;
        late_o  <= early_cnt < 6'd16;
        vote_o  <= 1'b1;
      end
    end
  end

endmodule
