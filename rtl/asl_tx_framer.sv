// asl_tx_framer: chooses what a serial link transmitter sends, frame by frame.
//
// At each frame boundary (tx_frame_i: core_byte_i is the header of the frame
// the switch core delivers for this port) the framer decides for the whole
// nine-byte frame: it forwards the switch core's frame when the link pair is
// ready and that frame carries data, and otherwise sends a calibration frame:
// control byte {idle=1, clock early, clock late, byte sync, frame sync,
// 3'b000}, the framing bytes 11001111 and 00001100, and six 01010101 timing
// bytes. So calibration frames are sent from reset until the pair is
// synchronised, and afterwards in place of idle frames, which keeps the far
// end's timing loop fed. Sending calibration frames in place of idle frames
// is this design's reading of "when the idle bit is set, the frame is used
// for calibrating". Byte clock domain; tx_byte_o is registered.
module asl_tx_framer
  import xbar_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              tx_frame_i,
  input  logic [BYTE_W-1:0] core_byte_i,
  input  logic              ready_i,       // link pair synchronised
  input  logic              early_i,       // status reported to the far end
  input  logic              late_i,
  input  logic              byte_sync_i,
  input  logic              frame_sync_i,
  output logic [BYTE_W-1:0] tx_byte_o,
  output logic              cal_o          // tx_byte_o is a calibration byte
);

  logic [BPOS_W-1:0] pos_q, pos_now;
  logic              cal_q, cal_now;
  ctrl_byte_t        ctrl;
  logic [BYTE_W-1:0] cal_byte;
  hdr_t              core_hdr;

  assign core_hdr = hdr_t'(core_byte_i);

  always_comb begin
    ctrl    = '{idle: 1'b1, clk_early: early_i, clk_late: late_i,
                byte_sync: byte_sync_i, frame_sync: frame_sync_i, rsvd: 3'b000};
    pos_now = tx_frame_i ? '0
            : (pos_q == BPOS_W'(FRAME_BYTES - 1)) ? '0 : pos_q + 1'b1;
    cal_now = tx_frame_i ? (!ready_i || core_hdr.idle) : cal_q;
    case (pos_now)
      BPOS_W'(CAL_CTRL_POS):  cal_byte = ctrl;
      BPOS_W'(CAL_SYNC0_POS): cal_byte = SYNC_BYTE0;
      BPOS_W'(CAL_SYNC1_POS): cal_byte = SYNC_BYTE1;
      default:                cal_byte = TIMING_BYTE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_q     <= BPOS_W'(FRAME_BYTES - 1);
      cal_q     <= 1'b1;
      tx_byte_o <= '0;
      cal_o     <= 1'b1;
    end else begin
      pos_q     <= pos_now;
      cal_q     <= cal_now;
      tx_byte_o <= cal_now ? cal_byte : core_byte_i;
      cal_o     <= cal_now;
    end
  end

endmodule
