// prbs7_gen: byte-wide 7-bit pseudo-random bit sequence generator.
//
// Produces the PRBS-7 sequence of polynomial x^7 + x^6 + 1 (period 127
// bits), eight bits per clock, first bit in the most significant position,
// for the link self-test in which a serial link is exercised without the
// switch core. The polynomial is the common PRBS-7 choice; only the length of
// the sequence is this chip's. The register is seeded with all ones on reset
// (any non-zero seed works). One byte per enabled byte clock.
module prbs7_gen
  import xbar_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  output logic [BYTE_W-1:0] byte_o
);

  logic [6:0]        s_q, s_n;
  logic [BYTE_W-1:0] b_n;

  always_comb begin
    s_n = s_q;
    for (int i = BYTE_W - 1; i >= 0; i--) begin
      b_n[i] = s_n[6] ^ s_n[5];
      s_n    = {s_n[5:0], b_n[i]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q    <= '1;
      byte_o <= '0;
    end else if (en) begin
      s_q    <= s_n;
      byte_o <= b_n;
    end
  end

endmodule
