// xbar_ctrl: crossbar controller.
//
// Keeps the chip-wide frame timing and decides which ports take part in
// switching. All 32 ports are framed together, so one counter (pos_o, 0..8)
// gives the byte position of the bytes at the switch core inputs; frame_o is
// high when they are header bytes. The serial link receivers use the same
// count to check that the frames they receive line up. Each link reports
// ready when both directions of its pair are synchronised; the controller
// copies these flags into port_en_o only at frame boundaries, so a port is
// switched on or off between frames and never inside one. A port whose link
// never synchronises, for example because nothing is connected, simply stays
// disabled. recal_i (one pulse) restarts calibration of every link: at the
// next frame boundary all ports are disabled and link_clr_o pulses, so no
// frame is cut short. link_clr_o is also high during reset. n_enabled_o
// counts the enabled ports. Which signals the
// controller uses and how it times them is this design's choice; the chip
// only states what the controller is responsible for. Byte clock domain,
// synchronous active-high reset.
module xbar_ctrl
  import xbar_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  recal_i,
  input  logic [NPORTS-1:0]     link_ready_i,
  output logic [BPOS_W-1:0]     pos_o,
  output logic                  frame_o,
  output logic [NPORTS-1:0]     port_en_o,
  output logic                  link_clr_o,
  output logic [$clog2(NPORTS+1)-1:0] n_enabled_o
);

  logic recal_q;   // recalibration requested, waiting for a frame boundary

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_o      <= '0;
      port_en_o  <= '0;
      link_clr_o <= 1'b1;
      recal_q    <= 1'b0;
    end else begin
      pos_o      <= (pos_o == BPOS_W'(FRAME_BYTES - 1)) ? '0 : pos_o + 1'b1;
      link_clr_o <= 1'b0;
      if (recal_i) recal_q <= 1'b1;
      if (pos_o == BPOS_W'(FRAME_BYTES - 1)) begin
        if (recal_q || recal_i) begin
          port_en_o  <= '0;
          link_clr_o <= 1'b1;
          recal_q    <= 1'b0;
        end else begin
          port_en_o  <= link_ready_i;
        end
      end
    end
  end

  assign frame_o = (pos_o == '0);

  always_comb begin
    n_enabled_o = '0;
    for (int p = 0; p < NPORTS; p++)
      n_enabled_o += ($clog2(NPORTS+1))'(port_en_o[p]);
  end

endmodule
