// asl_serializer: parallel-to-serial converter of a serial link transmitter.
//
// Converts one byte per byte clock into the 1.6 Gb/s bit stream, most
// significant bit first. The shift register runs on the 800 MHz transmit
// clock and moves two bits per cycle, because the link sends a bit on each
// clock edge: the first bit of a pair goes out while the clock is high, the
// second while it is low. The byte from the byte clock domain is taken at the
// tx_clk edge that ends phase 1, half a byte period after byteclk rose, so
// the crossing has a full half period of margin. The differential open-drain
// driver that follows is analog and not modelled; tx_bit is the logic value
// it sends. Synchronous active-high reset; the output idles low.
module asl_serializer
  import xbar_pkg::*;
(
  input  logic              tx_clk,     // 800 MHz transmit clock
  input  logic              rst,
  input  logic [1:0]        phase,      // from byte_clock_gen
  input  logic [BYTE_W-1:0] byte_i,     // byte clock domain
  output logic              tx_bit      // serial data, both clock edges
);

  logic [5:0] rest_q;   // bits still to send of the current byte
  logic [1:0] pair_q;   // {first, second} bit of this clock cycle

  always_ff @(posedge tx_clk) begin
    if (rst) begin
      rest_q <= '0;
      pair_q <= '0;
    end else if (phase == 2'd1) begin
      pair_q <= byte_i[7:6];
      rest_q <= byte_i[5:0];
    end else begin
      pair_q <= rest_q[5:4];
      rest_q <= {rest_q[3:0], 2'b00};
    end
  end

  // Double-data-rate output: the clock selects which bit of the pair drives.
  assign tx_bit = tx_clk ? pair_q[1] : pair_q[0];

endmodule
