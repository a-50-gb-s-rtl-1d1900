// tag_decoder: reverse routing tag decoder of one port.
//
// Sits beside input port i and watches the byte on that port's input line.
// In the header byte of a frame (hdr_i high) it takes the five-bit reverse
// routing tag, which names the input port that is to send to output port i,
// and sets the three stage selects of output i's 32:1 multiplexer from it.
// The tag is also stored, so the setting holds for the eight payload bytes.
// In the header cycle itself the selects come straight from the incoming tag,
// so the whole frame, header included, takes the new path; this bypass is
// this design's choice (the chip only says the decoder changes its setting on
// a header byte). A header with the idle bit set carries no tag, and while
// the port is disabled there is none either: in both cases the decoder points
// output i at its own input, which then carries an idle frame. Clocked by
// the byte clock; synchronous active-high reset.
module tag_decoder
  import xbar_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              hdr_i,     // byte_i is a header byte
  input  logic              en_i,      // port enabled by the controller
  input  logic [BYTE_W-1:0] byte_i,    // byte on this port's input line
  input  logic [TAG_W-1:0]  own_port,  // number of this port
  output logic [TAG_W-1:0]  tag_o,     // input port selected this cycle
  output logic              sel2,
  output logic [1:0]        sel4a,
  output logic [1:0]        sel4b
);

  hdr_t             hdr;
  logic [TAG_W-1:0] tag_q;
  logic [TAG_W-1:0] tag_new;

  assign hdr     = hdr_t'(byte_i);
  assign tag_new = (en_i && !hdr.idle) ? hdr.tag : own_port;

  always_ff @(posedge clk) begin
    if (rst)        tag_q <= own_port;
    else if (hdr_i) tag_q <= tag_new;
  end

  always_comb begin
    tag_o = hdr_i ? tag_new : tag_q;
    sel2  = tag_o[0];
    sel4a = tag_o[2:1];
    sel4b = tag_o[4:3];
  end

endmodule
