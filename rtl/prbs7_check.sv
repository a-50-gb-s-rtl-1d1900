// prbs7_check: self-synchronising PRBS-7 verifier, one byte per clock.
//
// Each received bit is predicted from the seven bits before it with the
// recurrence b[n] = b[n-6] xor b[n-7] of x^7 + x^6 + 1, so the checker needs
// no byte or frame alignment and no seed: after the first seven bits every
// bit is checked. err_cnt_o counts wrong bits and saturates; bits_o counts
// checked bytes (saturating). A single line error shows as three bit errors,
// as usual for a self-synchronising checker. Synchronous active-high reset.
module prbs7_check
  import xbar_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [BYTE_W-1:0] byte_i,
  output logic [CNT_W-1:0]  err_cnt_o,
  output logic [CNT_W-1:0]  bytes_o
);

  logic [6:0] h_q, h_n;
  logic [3:0] primed_q;     // bits seen so far, up to 7
  logic [3:0] prim_n;
  logic [3:0] errs;

  always_comb begin
    h_n    = h_q;
    prim_n = primed_q;
    errs   = '0;
    for (int i = BYTE_W - 1; i >= 0; i--) begin
      if (prim_n == 4'd7 && byte_i[i] != (h_n[6] ^ h_n[5]))
        errs = errs + 4'd1;
      h_n = {h_n[5:0], byte_i[i]};
      if (prim_n != 4'd7) prim_n = prim_n + 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      h_q       <= '0;
      primed_q  <= '0;
      err_cnt_o <= '0;
      bytes_o   <= '0;
    end else if (en) begin
      h_q      <= h_n;
      primed_q <= prim_n;
      if (err_cnt_o <= {CNT_W{1'b1}} - CNT_W'(errs))
        err_cnt_o <= err_cnt_o + CNT_W'(errs);
      else
        err_cnt_o <= '1;
      if (bytes_o != '1) bytes_o <= bytes_o + 1'b1;
    end
  end

endmodule
