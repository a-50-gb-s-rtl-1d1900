// port_card_model: behavioural model of a port chip's smart end, for testbenches.
//
// Not synthesizable. Talks to one crossbar link at the bit level, on both
// edges of the 800 MHz clock, and plays the smart end's part of the link
// calibration:
//   1. it sends 11000001 until its own receiver has found the framing bytes
//      of two successive calibration frames from the crossbar, exactly one
//      frame apart (it never loses lock again);
//   2. it then sends calibration frames carrying its receiver's sync status;
//      its timing bytes stand for samples taken 90 degrees off: 01010101 while
//      its modelled clock phase error ph is negative (early), 10101010 while
//      positive, alternating between the two at zero;
//   3. each calibration control byte from the crossbar moves ph by one step
//      in the direction of the reported early/late vote, and while the
//      crossbar reports byte sync without frame sync the model delays its
//      frames by one byte (a "slip");
//   4. once the crossbar reports byte and frame sync and ph is within one
//      step of zero it switches to data:
//      global frame gframe belongs to epoch gframe/8; frames 0..1 of an epoch
//      are idle (calibration) frames, frames 2..7 carry the tag tag_of(PORT,
//      epoch) and a payload naming the source port and the epoch. Every data
//      frame received is checked against the tag this port asked for in that
//      epoch and against the payload formula.
// With prbs high it sends a PRBS-7 bit stream instead and, while prbs_chk is
// high, checks the one it receives; inject_err flips one transmitted bit.
// LOOPBACK makes every tag name the port itself. The line is driven a
// quarter clock period after each clock edge and the received line is
// sampled a quarter period after each edge.
module port_card_model #(
  parameter int PORT       = 0,
  parameter int BIT_DELAY  = 0,   // extra bits before the first byte
  parameter int START_PH   = 3,   // initial clock phase error, steps
  parameter int IDLE_HOLD  = 0,   // extra byte times in stage 1
  parameter bit LOOPBACK   = 0    // ask for its own frames back
) (
  input  logic clk800,
  input  int   gframe,            // global frame counter
  input  logic prbs,
  input  logic prbs_chk,
  input  logic inject_err,
  output logic line_o,
  input  logic line_i,
  output int   n_rx_data,
  output int   n_rx_err,
  output int   n_adjust,
  output int   n_slip,
  output int   n_rx_cal,
  output int   n_tx_idle,
  output int   n_prbs_err,
  output int   n_prbs_bits,
  output logic rx_locked,
  output logic data_mode,
  output logic pre_cal            // still sending 11000001
);
  import xbar_pkg::*;

  function automatic logic [4:0] tag_of(int port, int epoch);
    int unsigned h;
    if (LOOPBACK) return 5'(port);
    h = (port * 32'd2654435761) ^ (epoch * 32'd40503) ^ (epoch << 7);
    h = h ^ (h >> 13);
    return 5'(h % 32);
  endfunction

  function automatic logic [7:0] payload(int src, int epoch, int pos);
    return (pos == 1) ? 8'(src) : (pos == 2) ? 8'(epoch) : 8'(src * 8 + pos) ^ 8'(epoch);
  endfunction

  bit   txq[$];
  int   ph = START_PH;
  int   tx_pos = 0;
  logic tx_cal = 1'b1;
  logic [4:0] tx_tag;
  int   tx_epoch;
  int   idle_left = IDLE_HOLD;
  int   slip_wait = 0;
  logic far_bs = 0, far_fs = 0, far_early = 0, far_late = 0;
  logic dither = 0;
  logic [6:0] ptx = '1;           // PRBS transmitter state
  logic [6:0] prx = '0;           // PRBS checker history
  int   prx_n = 0;
  logic flip_pending = 0;

  // receive side
  logic [15:0] rsh = '0;
  int   rbit = 0, rpos = 0;
  int   since_hit = 0;
  logic [7:0] rbyte;
  logic r_data;                   // current received frame is data
  int   r_epoch, r_src;
  logic [4:0] want_tag [int];     // tag this port asked for, per epoch

  initial begin
    line_o = 0; rx_locked = 0; data_mode = 0; pre_cal = 1;
    n_rx_data = 0; n_rx_err = 0; n_adjust = 0; n_slip = 0; n_rx_cal = 0;
    n_tx_idle = 0; n_prbs_err = 0; n_prbs_bits = 0;
    for (int i = 0; i < BIT_DELAY; i++) txq.push_back(1'b0);
  end

  function automatic logic [7:0] next_byte();
    logic [7:0] b;
    int e;
    if (!rx_locked || idle_left > 0) begin
      if (rx_locked) idle_left--;
      pre_cal = 1;
      return SMART_IDLE;
    end
    pre_cal = 0;
    if (tx_pos == 0) begin
      e = gframe / 8;
      tx_cal = !(data_mode && (gframe % 8) >= 2);
      if (tx_cal && data_mode) n_tx_idle++;
      tx_epoch = e;
      tx_tag   = tag_of(PORT, e);
      if (!tx_cal) want_tag[e % 256] = tx_tag;
    end
    if (tx_cal) begin
      case (tx_pos)
        0: b = {1'b1, 1'b0, 1'b0, rx_locked, rx_locked, 3'b000};
        1: b = SYNC_BYTE0;
        2: b = SYNC_BYTE1;
        3: b = TIMING_BYTE;
        default: b = (ph < 0) ? TIMING_BYTE : (ph > 0) ? ~TIMING_BYTE
                   : (dither ? TIMING_BYTE : ~TIMING_BYTE);
      endcase
    end else begin
      b = (tx_pos == 0) ? {1'b0, tx_tag, 2'b00} : payload(PORT, tx_epoch, tx_pos);
    end
    tx_pos = (tx_pos == 8) ? 0 : tx_pos + 1;
    return b;
  endfunction

  function automatic void push_byte(logic [7:0] b);
    for (int i = 7; i >= 0; i--) txq.push_back(b[i]);
  endfunction

  function automatic logic prbs_bit();
    logic nb;
    nb  = ptx[6] ^ ptx[5];
    ptx = {ptx[5:0], nb};
    return nb;
  endfunction

  // transmit: one bit per clock edge, a quarter period after it
  always @(clk800) begin
    #0.3125;
    if (prbs) begin
      line_o <= prbs_bit() ^ flip_pending;
      flip_pending = 0;
    end else begin
      if (txq.size() < 2) push_byte(next_byte());
      line_o <= txq.pop_front();
    end
  end

  always @(posedge inject_err) flip_pending = 1;

  // leaving the framed protocol: start again from stage 1 afterwards
  always @(posedge prbs) begin
    rx_locked = 0; data_mode = 0; tx_pos = 0; txq.delete();
    far_bs = 0; far_fs = 0;
  end

  // received control byte of a calibration frame
  function automatic void got_ctrl(logic [7:0] b);
    ctrl_byte_t c;
    c = ctrl_byte_t'(b);
    n_rx_cal++;
    far_bs = c.byte_sync; far_fs = c.frame_sync;
    far_early = c.clk_early; far_late = c.clk_late;
    if (far_early) begin ph++; n_adjust++; end
    else if (far_late) begin ph--; n_adjust++; end
    dither = ~dither;
    if (!data_mode) begin
      if (far_bs && !far_fs) begin
        if (slip_wait == 0) begin
          push_byte(TIMING_BYTE);   // delay own frames by one byte
          n_slip++;
          slip_wait = 3;
        end else slip_wait--;
      end
      if (far_bs && far_fs && ph >= -1 && ph <= 1) data_mode = 1;
    end else if (!far_bs || !far_fs) begin
      data_mode = 0;                // crossbar restarted calibration
    end
  endfunction

  function automatic void got_byte(logic [7:0] b, int pos);
    if (pos == 0) begin
      r_data = !b[7];
      if (!r_data) got_ctrl(b);
    end else if (r_data) begin
      if (pos == 1) r_src = int'(b);
      if (pos == 2) begin
        r_epoch = int'(b);
        if (!want_tag.exists(r_epoch) || want_tag[r_epoch] != 5'(r_src)) begin
          n_rx_err++;
          if (n_rx_err < 4) $display("port %0d: frame of epoch %0d from port %0d, expected %0d",
                   PORT, r_epoch, r_src,
                   want_tag.exists(r_epoch) ? int'(want_tag[r_epoch]) : -1);
        end
      end
      if (pos >= 3 && b != payload(r_src, r_epoch, pos)) begin
        n_rx_err++;
        if (n_rx_err < 4) $display("port %0d: byte %0d of a frame from port %0d epoch %0d is %02h, expected %02h at %0t",
                 PORT, pos, r_src, r_epoch, b, payload(r_src, r_epoch, pos), $time);
      end
      if (pos == 8) n_rx_data++;
    end else if ((pos == 1 && b != SYNC_BYTE0) || (pos == 2 && b != SYNC_BYTE1)) begin
      n_rx_err++;
    end
  endfunction

  // receive: sample a quarter period after each clock edge
  always @(clk800) begin
    logic s;
    #0.3125;
    s = line_i;
    if (prbs) begin
      if (prbs_chk) begin
        if (prx_n >= 7) begin
          n_prbs_bits++;
          if (s != (prx[6] ^ prx[5])) n_prbs_err++;
        end else prx_n++;
      end else prx_n = 0;
      prx = {prx[5:0], s};
    end else begin
      rsh = {rsh[14:0], s};
      if (!rx_locked) begin
        since_hit++;
        if (rsh == {SYNC_BYTE0, SYNC_BYTE1}) begin
          // lock on two framing patterns exactly one frame apart
          if (since_hit == 72) begin
            rx_locked = 1; rbit = 0; rpos = 3; r_data = 0;
          end
          since_hit = 0;
        end
      end else begin
        rbit++;
        if (rbit == 8) begin
          rbit = 0;
          got_byte(rsh[7:0], rpos);
          rpos = (rpos == 8) ? 0 : rpos + 1;
        end
      end
    end
  end

endmodule
