// asl_deserializer: serial-to-parallel converter of a serial link receiver.
//
// The receiver samples the line on both edges of the 800 MHz receive clock:
// the rising edge sample is the earlier bit of a pair, the falling edge
// sample the later one. Every cycle two bits are shifted into an eight-bit
// register, and at the rx_clk edge that ends phase 1 (mid byte period) the
// last eight bits are copied to word_o, earliest bit in the most significant
// position. word_o is therefore stable around the byte clock's rising edge,
// where the byte clock domain samples it. The word has no byte alignment:
// asl_rx_align finds the byte boundary. Synchronous active-high reset.
module asl_deserializer
  import xbar_pkg::*;
(
  input  logic              rx_clk,   // 800 MHz receive clock
  input  logic              rst,
  input  logic [1:0]        phase,    // from byte_clock_gen
  input  logic              rx_bit,   // sampled line value
  output logic [BYTE_W-1:0] word_o    // eight most recent bits
);

  logic             pos_q;   // rising-edge sample
  logic             neg_q;   // falling-edge sample
  logic [BYTE_W-1:0] sh_q;
  logic [BYTE_W-1:0] sh_next;

  always_ff @(negedge rx_clk) begin
    if (rst) neg_q <= 1'b0;
    else     neg_q <= rx_bit;
  end

  assign sh_next = {sh_q[5:0], pos_q, neg_q};

  always_ff @(posedge rx_clk) begin
    if (rst) begin
      pos_q  <= 1'b0;
      sh_q   <= '0;
      word_o <= '0;
    end else begin
      pos_q <= rx_bit;
      sh_q  <= sh_next;
      if (phase == 2'd1) word_o <= sh_next;
    end
  end

endmodule
