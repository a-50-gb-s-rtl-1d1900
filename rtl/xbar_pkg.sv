// xbar_pkg: constants and frame formats shared by the crossbar chip.
//
// All on-chip datapaths are one byte wide and run at the byte clock, one
// eighth of the serial bit rate. Data moves in nine-byte frames: a header
// byte followed by eight payload bytes. The header carries an idle bit, a
// five-bit reverse routing tag and two reserved bits (bit positions of the
// 72-bit frame: 71 idle, 70..66 tag, 65..64 reserved, 63..0 payload), so the
// header is the first byte sent. Calibration frames use the same first-byte
// position for a control byte, followed by two framing bytes and six timing
// bytes; those byte values are fixed here. The bit order of the control
// byte's four status bits follows the order in which the frame format lists
// them (early, late, byte sync, frame sync); that order is this design's
// choice.
package xbar_pkg;

  localparam int unsigned NPORTS      = 32;  // ports of the crossbar
  localparam int unsigned BYTE_W      = 8;   // datapath width
  localparam int unsigned FRAME_BYTES = 9;   // header + 8 payload bytes
  localparam int unsigned TAG_W       = 5;   // reverse routing tag width
  localparam int unsigned BPOS_W      = 4;   // width of a byte-in-frame index

  // Calibration frame contents (bytes 2..9 of the frame).
  localparam logic [7:0] SYNC_BYTE0  = 8'b1100_1111;  // byte/frame sync, byte 2
  localparam logic [7:0] SYNC_BYTE1  = 8'b0000_1100;  // byte/frame sync, byte 3
  localparam logic [7:0] TIMING_BYTE = 8'b0101_0101;  // bit sync, bytes 4..9
  // Pattern a smart transmitter repeats before its return link is locked.
  localparam logic [7:0] SMART_IDLE  = 8'b1100_0001;

  // Byte positions (0-based) inside a calibration frame.
  localparam int unsigned CAL_CTRL_POS   = 0;
  localparam int unsigned CAL_SYNC0_POS  = 1;
  localparam int unsigned CAL_SYNC1_POS  = 2;
  localparam int unsigned CAL_VOTE_FIRST = 4;  // fifth byte
  localparam int unsigned CAL_VOTE_LAST  = 7;  // eighth byte

  // Header byte of a data frame.
  typedef struct packed {
    logic             idle;   // 1: frame carries no useful data
    logic [TAG_W-1:0] tag;    // input port that sends to this port
    logic [1:0]       rsvd;   // system use, ignored by the crossbar
  } hdr_t;

  // Control byte of a calibration frame.
  typedef struct packed {
    logic       idle;        // always 1 in a calibration frame
    logic       clk_early;   // far transmitter's clock is early
    logic       clk_late;    // far transmitter's clock is late
    logic       byte_sync;   // receiver of the other link has byte lock
    logic       frame_sync;  // receiver of the other link has frame lock
    logic [2:0] rsvd;
  } ctrl_byte_t;

endpackage
