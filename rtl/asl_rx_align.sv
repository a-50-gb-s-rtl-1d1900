// asl_rx_align: byte and frame synchronisation of a serial link receiver.
//
// Works in the byte clock domain on the unaligned words from
// asl_deserializer. The last three words form a 24-bit window in which the
// two framing bytes of a calibration frame (11001111 00001100) are searched
// at all eight bit offsets. These bytes cannot appear in the 11000001 pattern
// a smart transmitter repeats before calibration, whose longest run of ones
// is three, so that pattern cannot cause a false lock. A hit fixes the bit
// offset of the byte boundary; rx_byte_o is the realigned byte stream, one
// register after the window. byte_sync is set once two hits in a row agree on
// the offset. Frame sync additionally needs the second framing byte to reach
// rx_byte_o when the chip-wide frame counter pos_i is 2, i.e. the received
// frames line up with the crossbar's common framing; a hit at any other
// frame position clears frame_sync, which tells the far end to shift its
// frames. While hold_i is high (the link carries traffic, whose payload may
// contain the framing bytes) hits are ignored. The two-hit rule, the use of
// the common frame counter and keeping sync until clr_i are this design's
// choices. Synchronous active-high reset.
module asl_rx_align
  import xbar_pkg::*;
(
  input  logic              clk,         // byte clock
  input  logic              rst,
  input  logic              clr_i,       // restart calibration
  input  logic              hold_i,      // link in use: keep the offset
  input  logic [BYTE_W-1:0] word_i,      // unaligned word, from deserializer
  input  logic [BPOS_W-1:0] pos_i,       // chip-wide byte position 0..8
  output logic [BYTE_W-1:0] rx_byte_o,   // aligned byte
  output logic              hit_o,       // rx_byte_o is the 2nd framing byte
  output logic [2:0]        bit_off_o,   // current bit offset
  output logic              byte_sync_o,
  output logic              frame_sync_o
);

  localparam logic [15:0] SYNC_PAT = {SYNC_BYTE0, SYNC_BYTE1};

  logic [BYTE_W-1:0] w0, w1, w2;   // w2 oldest
  logic [23:0]       win;
  logic              found;
  logic [2:0]        found_off;
  logic [2:0]        off_use;
  logic [15:0]       pair;
  logic              seen_q;      // at least one hit so far

  assign win = {w2, w1, w0};

  always_comb begin
    found     = 1'b0;
    found_off = '0;
    for (int k = 7; k >= 0; k--) begin
      if (win[23-k -: 16] == SYNC_PAT) begin
        found     = 1'b1;
        found_off = 3'(k);
      end
    end
    off_use = (found && !hold_i) ? found_off : bit_off_o;
    pair    = {w1, w0};
  end

  always_ff @(posedge clk) begin
    if (rst || clr_i) begin
      w0           <= '0;
      w1           <= '0;
      w2           <= '0;
      rx_byte_o    <= '0;
      hit_o        <= 1'b0;
      bit_off_o    <= '0;
      seen_q       <= 1'b0;
      byte_sync_o  <= 1'b0;
      frame_sync_o <= 1'b0;
    end else begin
      w0        <= word_i;
      w1        <= w0;
      w2        <= w1;
      rx_byte_o <= pair[15 - int'(off_use) -: 8];
      hit_o     <= found && !hold_i;
      if (found && !hold_i) begin
        bit_off_o   <= found_off;
        seen_q      <= 1'b1;
        byte_sync_o <= seen_q && (found_off == bit_off_o);
      end
      // Frame position check one cycle after the hit, against pos_i.
      if (hit_o)
        frame_sync_o <= byte_sync_o && (pos_i == BPOS_W'(CAL_SYNC1_POS));
    end
  end

endmodule
