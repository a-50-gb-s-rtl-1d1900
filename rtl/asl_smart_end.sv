// asl_smart_end: digital phase control and bring-up of the port-chip (smart)
// end of an asymmetric serial link pair.
//
// The smart end is the side that moves its clocks. Its receive and transmit
// clocks come from phase interpolators outside this module; this module
// keeps the two interpolator codes (rx_code_o, tx_code_o) and tells the
// interpolators when to sample or send shifted by 90 degrees (rx_shift_o,
// tx_shift_o), during the timing bytes of calibration frames. Here the
// shift registers run on the local 800 MHz clock and byte clock, and the
// interpolators, being analog, act on the lines outside.
//
// Bring-up follows the link pair protocol:
//   1. pre-calibration: send 11000001 repeatedly (it contains no framing
//      pattern, so the far receiver cannot lock on it) while the receiver
//      finds byte and frame sync on the far end's calibration frames and
//      then bit sync (its phase loop reaches the eye centre, seen as the
//      first tie or reversal of its votes);
//   2. then send calibration frames carrying this receiver's vote and sync
//      status;
//   3. the far end's control bytes report how it sees this transmitter:
//      its early/late bits step tx_code_o, and byte sync without frame sync
//      makes the transmitter delay its framing by one byte (a slip);
//   4. with sync in both directions the pair is ready and the transmitter
//      sends the frames presented on data_i (header when tx_frame_o is high;
//      idle frames are still replaced by calibration frames).
// The receiver's own majority vote on the fifth to eighth bytes of each
// calibration frame (asl_cal_monitor) steps rx_code_o. The receiver's frame
// position counter follows the received framing: a framing hit that does
// not fall on position 2 moves the counter onto it.
//
// Following the source design: the pre-calibration pattern, the order of
// synchronisation, the control byte and the vote. This design's choices:
// an early vote increments a code (delays that clock) and a late vote
// decrements it, codes wrap around (an interpolator is circular), one step
// per vote, bit sync as the first tie or reversal of the votes, and at most
// one slip every four received control bytes. The shift flags cover the last
// five timing bytes (positions 4..8), as the calibration sequence figure
// marks them. Synchronous active-high
// reset; clr_i restarts bring-up.
module asl_smart_end
  import xbar_pkg::*;
#(
  parameter int CODE_W = 6          // interpolator code width
) (
  input  logic              clk800,
  input  logic              byteclk,
  input  logic [1:0]        phase,
  input  logic              rst,
  input  logic              clr_i,
  input  logic              rx_serial_i,
  output logic              tx_serial_o,
  // port side
  input  logic [BYTE_W-1:0] data_i,        // frame byte to send
  output logic              tx_frame_o,    // data_i must be a header now
  output logic [BYTE_W-1:0] rx_byte_o,     // aligned received byte
  output logic [BPOS_W-1:0] rx_pos_o,      // its frame position
  // status
  output logic              ready_o,
  output logic              precal_o,      // sending 11000001
  output logic              rx_byte_sync_o,
  output logic              rx_frame_sync_o,
  output logic              far_byte_sync_o,
  output logic              far_frame_sync_o,
  output logic              slip_o,        // framing delayed one byte
  output logic              rx_step_o,     // rx_code_o changed
  output logic              tx_step_o,     // tx_code_o changed
  // phase interpolators
  output logic [CODE_W-1:0] rx_code_o,
  output logic [CODE_W-1:0] tx_code_o,
  output logic              rx_shift_o,
  output logic              tx_shift_o
);

  logic [BYTE_W-1:0] word, frm_byte, tx_byte;
  logic              hit;
  logic [2:0]        bit_off;
  logic [BPOS_W-1:0] rpos_q, tpos_q, tbyte_pos_q;
  logic              early, late, vote, cal_tx;
  logic              precal_q, slip_now;
  logic [1:0]        slip_wait_q;
  logic              tx_shift_q;
  logic              bit_lock_q, last_early_q, voted_q;
  ctrl_byte_t        rx_ctrl;

  // ---------------- receiver ----------------
  asl_deserializer u_deser (
    .rx_clk (clk800), .rst (rst), .phase (phase),
    .rx_bit (rx_serial_i), .word_o (word)
  );

  asl_rx_align u_align (
    .clk (byteclk), .rst (rst), .clr_i (clr_i), .hold_i (ready_o),
    .word_i (word), .pos_i (rpos_q), .rx_byte_o (rx_byte_o), .hit_o (hit),
    .bit_off_o (bit_off), .byte_sync_o (rx_byte_sync_o),
    .frame_sync_o (rx_frame_sync_o)
  );

  // Receive frame position: free running, pulled onto the framing bytes.
  always_ff @(posedge byteclk) begin
    if (rst || clr_i)
      rpos_q <= '0;
    else if (hit && !ready_o && rpos_q != BPOS_W'(CAL_SYNC1_POS))
      rpos_q <= BPOS_W'(CAL_SYNC1_POS + 1);
    else
      rpos_q <= (rpos_q == BPOS_W'(FRAME_BYTES - 1)) ? '0 : rpos_q + 1'b1;
  end
  assign rx_pos_o = rpos_q;

  asl_cal_monitor u_mon (
    .clk (byteclk), .rst (rst), .clr_i (clr_i), .rx_byte_i (rx_byte_o),
    .pos_i (rpos_q), .frame_sync_i (rx_frame_sync_o), .early_o (early),
    .late_o (late), .vote_o (vote), .far_byte_sync_o (far_byte_sync_o),
    .far_frame_sync_o (far_frame_sync_o)
  );

  assign rx_ctrl = ctrl_byte_t'(rx_byte_o);
  assign ready_o = rx_byte_sync_o && rx_frame_sync_o
                && far_byte_sync_o && far_frame_sync_o;

  // The 90-degree receive shift covers the last five timing bytes of an
  // expected calibration frame (positions 4..8), three byte clocks (the
  // deserializer and aligner latency) ahead of the aligned position.
  assign rx_shift_o = rx_frame_sync_o
                   && (rpos_q >= BPOS_W'(CAL_VOTE_FIRST - 3))
                   && (rpos_q <= BPOS_W'(FRAME_BYTES - 4));

  // ---------------- phase control ----------------
  always_ff @(posedge byteclk) begin
    if (rst || clr_i) begin
      rx_code_o <= '0;
      tx_code_o <= '0;
      rx_step_o <= 1'b0;
      tx_step_o <= 1'b0;
      bit_lock_q   <= 1'b0;
      last_early_q <= 1'b0;
      voted_q      <= 1'b0;
    end else begin
      rx_step_o <= 1'b0;
      tx_step_o <= 1'b0;
      if (vote && (early || late)) begin
        rx_code_o <= early ? rx_code_o + 1'b1 : rx_code_o - 1'b1;
        rx_step_o <= 1'b1;
      end
      // Bit sync: the receive loop has reached the eye centre once a vote
      // is a tie or reverses the previous one.
      if (vote) begin
        if (!(early || late) || (voted_q && early != last_early_q))
          bit_lock_q <= 1'b1;
        if (early || late) begin
          voted_q      <= 1'b1;
          last_early_q <= early;
        end
      end
      if (rx_frame_sync_o && rpos_q == BPOS_W'(CAL_CTRL_POS) && rx_ctrl.idle
          && (rx_ctrl.clk_early ^ rx_ctrl.clk_late)) begin
        tx_code_o <= rx_ctrl.clk_early ? tx_code_o + 1'b1 : tx_code_o - 1'b1;
        tx_step_o <= 1'b1;
      end
    end
  end

  // ---------------- transmitter ----------------
  // Slip: the far end has byte sync but not frame sync, so its framing bytes
  // arrive at the wrong position: start the next frame one byte later.
  assign slip_now = rx_frame_sync_o && rpos_q == BPOS_W'(CAL_CTRL_POS)
                 && rx_ctrl.idle && rx_ctrl.byte_sync && !rx_ctrl.frame_sync
                 && !precal_q && slip_wait_q == 2'd0;

  always_ff @(posedge byteclk) begin
    if (rst || clr_i) begin
      precal_q    <= 1'b1;
      tpos_q      <= '0;
      slip_wait_q <= '0;
      slip_o      <= 1'b0;
    end else begin
      slip_o <= 1'b0;
      if (rx_byte_sync_o && rx_frame_sync_o && bit_lock_q && tpos_q == '0)
        precal_q <= 1'b0;
      if (rx_frame_sync_o && rpos_q == BPOS_W'(CAL_CTRL_POS) && rx_ctrl.idle
          && slip_wait_q != 2'd0)
        slip_wait_q <= slip_wait_q - 1'b1;
      if (slip_now) begin
        slip_wait_q <= 2'd3;
        slip_o      <= 1'b1;   // tpos_q stays: this frame is one byte longer
      end else begin
        tpos_q <= (tpos_q == BPOS_W'(FRAME_BYTES - 1)) ? '0 : tpos_q + 1'b1;
      end
    end
  end

  assign tx_frame_o = (tpos_q == '0) && !slip_now;

  asl_tx_framer u_framer (
    .clk (byteclk), .rst (rst || clr_i), .tx_frame_i (tx_frame_o),
    .core_byte_i (data_i), .ready_i (ready_o), .early_i (early),
    .late_i (late), .byte_sync_i (rx_byte_sync_o),
    .frame_sync_i (rx_frame_sync_o), .tx_byte_o (frm_byte), .cal_o (cal_tx)
  );

  // Position of the byte now in frm_byte.
  always_ff @(posedge byteclk) begin
    if (rst || clr_i) begin
      tbyte_pos_q <= '0;
    end else begin
      tbyte_pos_q <= tx_frame_o ? '0
                   : (tbyte_pos_q == BPOS_W'(FRAME_BYTES - 1)) ? '0
                   : tbyte_pos_q + 1'b1;
    end
  end

  assign precal_o = precal_q;
  assign tx_byte  = precal_q ? SMART_IDLE : frm_byte;

  asl_serializer u_ser (
    .tx_clk (clk800), .rst (rst), .phase (phase),
    .byte_i (tx_byte), .tx_bit (tx_serial_o)
  );

  // The transmit shift flag is loaded with the byte it belongs to, so it is
  // high exactly while a timing byte of a calibration frame is on the line.
  always_ff @(posedge clk800) begin
    if (rst)
      tx_shift_q <= 1'b0;
    else if (phase == 2'd1)
      tx_shift_q <= !precal_q && cal_tx
                 && tbyte_pos_q >= BPOS_W'(CAL_VOTE_FIRST);
  end
  assign tx_shift_o = tx_shift_q;

endmodule
