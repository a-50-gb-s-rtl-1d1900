// asl_dumb_end: crossbar-side (dumb end) block of one asymmetric serial link pair.
//
// The crossbar end of a link pair never moves its own clocks: transmitter and
// receiver run on the fixed 800 MHz tree clock and the byte clock derived
// from it, and all clock adjustment is left to the port chip (the smart end).
// This block holds the digital half of that arrangement:
//   - asl_deserializer and asl_rx_align turn the received bit stream into
//     aligned bytes and find byte and frame sync on calibration frames;
//   - asl_cal_monitor reads the far end's control bytes and takes the
//     early/late majority vote on the timing bytes;
//   - asl_tx_framer sends calibration frames (carrying that vote and this
//     receiver's sync status back to the smart end) until the pair is ready,
//     then the switch core's frames, with calibration frames in place of idle
//     ones;
//   - asl_serializer sends the bytes at two bits per tree clock cycle.
// ready_o, the controller's enable condition, is high when this receiver has
// byte and frame sync and the far end reports both for its own receiver.
// With prbs_mode_i high the link runs its self-test instead: it sends a
// PRBS-7 stream and checks the one it receives, bypassing the switch core:
// ready_o is then low, so the controller takes the port out of switching,
// and the byte aligner keeps its bit offset.
// The analog driver, receiver front end and termination are not modelled;
// tx_serial_o and rx_serial_i are the logic values on the line.
// Byte-side signals are in the byteclk domain, rx_byte_o is registered.
module asl_dumb_end
  import xbar_pkg::*;
#(
  parameter bit HAS_PRBS = 1'b1   // build the PRBS-7 self-test
) (
  input  logic              clk800,
  input  logic              byteclk,
  input  logic [1:0]        phase,
  input  logic              rst,
  input  logic              clr_i,        // restart calibration
  input  logic [BPOS_W-1:0] pos_i,        // chip-wide byte position
  // line
  input  logic              rx_serial_i,
  output logic              tx_serial_o,
  // switch core side
  output logic [BYTE_W-1:0] rx_byte_o,
  input  logic [BYTE_W-1:0] core_byte_i,
  input  logic              tx_frame_i,
  // status
  output logic              ready_o,
  output logic              byte_sync_o,
  output logic              frame_sync_o,
  output logic              early_o,
  output logic              late_o,
  output logic              vote_o,
  output logic              cal_tx_o,
  // self-test
  input  logic              prbs_mode_i,
  output logic [15:0]       prbs_err_o,
  output logic [15:0]       prbs_bytes_o
);

  logic [BYTE_W-1:0] word;
  logic [BYTE_W-1:0] frm_byte, prbs_byte, tx_byte;
  logic              hit;
  logic [2:0]        bit_off;
  logic              far_bs, far_fs;

  asl_deserializer u_deser (
    .rx_clk (clk800), .rst (rst), .phase (phase),
    .rx_bit (rx_serial_i), .word_o (word)
  );

  asl_rx_align u_align (
    .clk (byteclk), .rst (rst), .clr_i (clr_i),
    .hold_i (ready_o || prbs_mode_i),
    .word_i (word), .pos_i (pos_i), .rx_byte_o (rx_byte_o), .hit_o (hit),
    .bit_off_o (bit_off), .byte_sync_o (byte_sync_o),
    .frame_sync_o (frame_sync_o)
  );

  asl_cal_monitor u_mon (
    .clk (byteclk), .rst (rst), .clr_i (clr_i), .rx_byte_i (rx_byte_o),
    .pos_i (pos_i), .frame_sync_i (frame_sync_o), .early_o (early_o),
    .late_o (late_o), .vote_o (vote_o), .far_byte_sync_o (far_bs),
    .far_frame_sync_o (far_fs)
  );

  assign ready_o = byte_sync_o && frame_sync_o && far_bs && far_fs
                && !(HAS_PRBS && prbs_mode_i);

  asl_tx_framer u_framer (
    .clk (byteclk), .rst (rst), .tx_frame_i (tx_frame_i),
    .core_byte_i (core_byte_i), .ready_i (ready_o), .early_i (early_o),
    .late_i (late_o), .byte_sync_i (byte_sync_o),
    .frame_sync_i (frame_sync_o), .tx_byte_o (frm_byte), .cal_o (cal_tx_o)
  );

  if (HAS_PRBS) begin : g_prbs
    prbs7_gen u_gen (
      .clk (byteclk), .rst (rst), .en (1'b1), .byte_o (prbs_byte)
    );
    prbs7_check #(.CNT_W(16)) u_chk (
      .clk (byteclk), .rst (rst || !prbs_mode_i), .en (prbs_mode_i),
      .byte_i (rx_byte_o), .err_cnt_o (prbs_err_o), .bytes_o (prbs_bytes_o)
    );
    assign tx_byte = prbs_mode_i ? prbs_byte : frm_byte;
  end else begin : g_no_prbs
    assign prbs_byte    = '0;
    assign prbs_err_o   = '0;
    assign prbs_bytes_o = '0;
    assign tx_byte      = frm_byte;
  end

  asl_serializer u_ser (
    .tx_clk (clk800), .rst (rst), .phase (phase),
    .byte_i (tx_byte), .tx_bit (tx_serial_o)
  );

endmodule
