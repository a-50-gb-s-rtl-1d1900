// xbar_top: 32 x 32 synchronous crossbar chip with asymmetric serial links.
//
// Thirty-two serial link blocks, each the crossbar (dumb) end of a link pair
// to a port chip, feed a byte-wide 32 x 32 switch core; a controller keeps
// the common frame timing and enables the ports whose links have
// synchronised. The 800 MHz clock from the PLL (vco_clk) or the scan clock
// enters the clock tree, and a divide-by-4 counter makes the 200 MHz byte
// clock on which the switch core, the controller and the links' byte logic
// run; the links' shift registers run on the 800 MHz clock and move one bit
// per clock edge, 1.6 Gb/s per line and 51.2 Gb/s in all.
//
// Data path of one frame: serial line -> deserializer -> byte aligner ->
// switch core input register -> 32:1 multiplexer chosen by the reverse
// routing tag -> output register -> transmit framer -> serializer -> line.
// The core adds two byte clocks; PRBS_MASK selects the links built with the
// PRBS-7 self-test, which prbs_mode switches on.
//
// The PLL, the PECL input converter, the delay matching circuits, the clock
// tree wiring and the analog line driver and receiver are not part of this
// RTL: vco_clk is the PLL output and the serial pins carry logic values.
// byteclk, pos and the status vectors are brought out for observation.
//
// The links in SMART_MASK (30 and 31 by default) can also work as smart ends
// (asl_smart_end) while their bit of smart_mode is high, so that the chip can play the
// port chip for another crossbar, or for one of its own links in a loop
// test. Such a link then drives its line from the smart end, its dumb end is
// held cleared (so the controller keeps the port out of the switch), and the
// smart end's data interface and phase interpolator controls are brought
// out on the smart_* ports; the interpolators themselves are analog and lie
// outside. Which links have smart ends follows the test chip, where two link
// blocks are smart ends that can also run as dumb ends; that they default to
// the last two is this design's choice.
// rst is synchronous to the byte clock and must last at least two byte
// clocks.
module xbar_top
  import xbar_pkg::*;
#(
  parameter logic [NPORTS-1:0] PRBS_MASK  = 32'h0000_000F,
  parameter logic [NPORTS-1:0] SMART_MASK = 32'hC000_0000
) (
  input  logic                          vco_clk,
  input  logic                          scan_clk,
  input  logic                          scan_mode,
  input  logic                          rst,
  input  logic                          recal,
  input  logic                          prbs_mode,
  input  logic [NPORTS-1:0]             rx_serial,
  output logic [NPORTS-1:0]             tx_serial,
  output logic                          byteclk,
  output logic [BPOS_W-1:0]             pos,
  output logic [NPORTS-1:0]             port_en,
  output logic [NPORTS-1:0]             link_ready,
  output logic [NPORTS-1:0]             link_vote,
  output logic [NPORTS-1:0]             link_byte_sync,
  output logic [NPORTS-1:0]             link_frame_sync,
  output logic [NPORTS-1:0]             link_early,
  output logic [NPORTS-1:0]             link_late,
  output logic [NPORTS-1:0][TAG_W-1:0]  route,
  output logic [NPORTS-1:0]             link_cal_tx,
  output logic [NPORTS-1:0][15:0]       prbs_err,
  output logic [NPORTS-1:0][15:0]       prbs_bytes,
  output logic [$clog2(NPORTS+1)-1:0]   n_enabled,
  // smart ends (links in SMART_MASK, while smart_mode is high)
  input  logic [NPORTS-1:0]             smart_mode,
  input  logic [NPORTS-1:0][BYTE_W-1:0] smart_data,
  output logic [NPORTS-1:0]             smart_frame,
  output logic [NPORTS-1:0][BYTE_W-1:0] smart_rx_data,
  output logic [NPORTS-1:0][BPOS_W-1:0] smart_rx_pos,
  output logic [NPORTS-1:0]             smart_ready,
  output logic [NPORTS-1:0][5:0]        smart_rx_code,
  output logic [NPORTS-1:0][5:0]        smart_tx_code,
  output logic [NPORTS-1:0]             smart_rx_shift,
  output logic [NPORTS-1:0]             smart_tx_shift
);

  logic                          tree_clk;
  logic [1:0]                    phase;
  logic                          frame_in, frame_out, link_clr;
  logic [NPORTS-1:0][BYTE_W-1:0] core_din, core_dout;

  byte_clock_gen u_clk (
    .vco_clk (vco_clk), .scan_clk (scan_clk), .scan_mode (scan_mode),
    .tree_clk (tree_clk), .byteclk (byteclk), .phase (phase)
  );

  xbar_ctrl u_ctrl (
    .clk (byteclk), .rst (rst), .recal_i (recal), .link_ready_i (link_ready),
    .pos_o (pos), .frame_o (frame_in), .port_en_o (port_en),
    .link_clr_o (link_clr), .n_enabled_o (n_enabled)
  );

  switch_core u_core (
    .clk (byteclk), .rst (rst), .frame_i (frame_in), .port_en (port_en),
    .din (core_din), .dout (core_dout), .frame_o (frame_out), .route_o (route)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_link
    logic dumb_tx;
    logic as_smart;

    assign as_smart = SMART_MASK[p] && smart_mode[p];

    asl_dumb_end #(.HAS_PRBS(PRBS_MASK[p])) u_link (
      .clk800 (tree_clk), .byteclk (byteclk), .phase (phase), .rst (rst),
      .clr_i (link_clr || as_smart), .pos_i (pos),
      .rx_serial_i (rx_serial[p]), .tx_serial_o (dumb_tx),
      .rx_byte_o (core_din[p]), .core_byte_i (core_dout[p]),
      .tx_frame_i (frame_out),
      .ready_o (link_ready[p]), .byte_sync_o (link_byte_sync[p]),
      .frame_sync_o (link_frame_sync[p]), .early_o (link_early[p]),
      .late_o (link_late[p]), .vote_o (link_vote[p]),
      .cal_tx_o (link_cal_tx[p]),
      .prbs_mode_i (prbs_mode), .prbs_err_o (prbs_err[p]),
      .prbs_bytes_o (prbs_bytes[p])
    );

    if (SMART_MASK[p]) begin : g_smart
      logic smart_tx;
      logic pre, rbs, rfs, fbs, ffs, slip, rstep, tstep;

      asl_smart_end u_smart (
        .clk800 (tree_clk), .byteclk (byteclk), .phase (phase), .rst (rst),
        .clr_i (link_clr || !as_smart), .rx_serial_i (rx_serial[p]),
        .tx_serial_o (smart_tx), .data_i (smart_data[p]),
        .tx_frame_o (smart_frame[p]), .rx_byte_o (smart_rx_data[p]),
        .rx_pos_o (smart_rx_pos[p]), .ready_o (smart_ready[p]),
        .precal_o (pre), .rx_byte_sync_o (rbs), .rx_frame_sync_o (rfs),
        .far_byte_sync_o (fbs), .far_frame_sync_o (ffs), .slip_o (slip),
        .rx_step_o (rstep), .tx_step_o (tstep),
        .rx_code_o (smart_rx_code[p]), .tx_code_o (smart_tx_code[p]),
        .rx_shift_o (smart_rx_shift[p]), .tx_shift_o (smart_tx_shift[p])
      );
      assign tx_serial[p] = as_smart ? smart_tx : dumb_tx;
    end else begin : g_dumb_only
      assign tx_serial[p]      = dumb_tx;
      assign smart_frame[p]    = 1'b0;
      assign smart_rx_data[p]  = '0;
      assign smart_rx_pos[p]   = '0;
      assign smart_ready[p]    = 1'b0;
      assign smart_rx_code[p]  = '0;
      assign smart_tx_code[p]  = '0;
      assign smart_rx_shift[p] = 1'b0;
      assign smart_tx_shift[p] = 1'b0;
    end
  end

endmodule
