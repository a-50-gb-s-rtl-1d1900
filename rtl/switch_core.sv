// switch_core: 32 x 32 byte-wide synchronous crossbar with multicast.
//
// Each input port's byte is first registered (input register), then driven
// onto that port's input line, which runs past the multiplexers of all 32
// output ports, and into the port's tag decoder. Reverse routing: the tag in
// the header from port i chooses the source of output port i, so several
// outputs that name the same input all receive it (multicast). Each output
// has a 32:1 multiplexer of 2:1, 4:1, 4:1 stages, followed by an output
// register, so a byte spends exactly one byte-clock cycle between the input
// and output registers, two cycles from din to dout.
//
// Framing is common to all ports: frame_i marks the cycle in which every
// din carries a header byte, and frame_o marks the headers at dout. A port
// the controller has disabled (port_en low) contributes an idle frame
// (header 0x80, payload zero) and its decoder selects its own port; this
// treatment of disabled ports is this design's choice. Runs on the byte
// clock with a synchronous active-high reset.
module switch_core
  import xbar_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          frame_i,   // din holds header bytes
  input  logic [NPORTS-1:0]             port_en,   // per-port enable
  input  logic [NPORTS-1:0][BYTE_W-1:0] din,
  output logic [NPORTS-1:0][BYTE_W-1:0] dout,
  output logic                          frame_o,   // dout holds header bytes
  output logic [NPORTS-1:0][TAG_W-1:0]  route_o    // source chosen per output
);

  logic [NPORTS-1:0][BYTE_W-1:0] in_q;     // input registers / input lines
  logic [NPORTS-1:0]             en_q;
  logic                          hdr_q;    // in_q holds header bytes
  logic [NPORTS-1:0][BYTE_W-1:0] mux_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q  <= '0;
      en_q  <= '0;
      hdr_q <= 1'b0;
    end else begin
      hdr_q <= frame_i;
      en_q  <= port_en;
      for (int p = 0; p < NPORTS; p++)
        in_q[p] <= port_en[p] ? din[p] : (frame_i ? 8'h80 : 8'h00);
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic       s2;
    logic [1:0] s4a, s4b;

    tag_decoder u_dec (
      .clk      (clk),
      .rst      (rst),
      .hdr_i    (hdr_q),
      .en_i     (en_q[p]),
      .byte_i   (in_q[p]),
      .own_port (TAG_W'(p)),
      .tag_o    (route_o[p]),
      .sel2     (s2),
      .sel4a    (s4a),
      .sel4b    (s4b)
    );

    mux32_tree u_mux (
      .in_lines (in_q),
      .sel2     (s2),
      .sel4a    (s4a),
      .sel4b    (s4b),
      .out_line (mux_out[p])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout    <= '0;
      frame_o <= 1'b0;
    end else begin
      dout    <= mux_out;
      frame_o <= hdr_q;
    end
  end

endmodule
