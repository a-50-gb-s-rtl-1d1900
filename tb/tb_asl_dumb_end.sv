// tb_asl_dumb_end: one crossbar-side link block against a behavioural port
// chip. The bench plays the rest of the crossbar: it keeps the frame
// position count and loops the received frames back through a two-register
// stand-in for the switch core (idle frames while the port is not enabled).
// The port chip asks for its own frames back, so every data frame it gets
// must be its own. Checked: the pair synchronises (bit offset, phase votes,
// frame slips), data frames return intact, idle frames are replaced by
// calibration frames, and the PRBS-7 self-test runs in both directions and
// counts one injected bit error as three.
module tb_asl_dumb_end;
  import xbar_pkg::*;
  logic vco = 0, rst = 1, clr = 0, prbs_mode = 0;
  logic tree_clk, byteclk;
  logic [1:0] phase;
  logic [BPOS_W-1:0] pos = '0;
  logic line_in, line_out;
  logic [BYTE_W-1:0] rx_byte, in_q = '0, out_q = '0;
  logic en = 0, ready, bs, fs, early, late, vote, cal_tx;
  logic [15:0] perr, pbytes;
  int checks = 0, failures = 0, gframe = 0, n_votes = 0, n_sub = 0;
  logic m_prbs = 0, m_chk = 0, m_inj = 0;
  int n_rx_data, n_rx_err, n_adjust, n_slip, n_rx_cal, n_tx_idle, n_perr, n_pbits;
  logic m_locked, m_data, m_pre;

  always #0.625 vco = ~vco;

  byte_clock_gen u_clk (.vco_clk (vco), .scan_clk (1'b0), .scan_mode (1'b0),
                        .tree_clk, .byteclk, .phase);

  asl_dumb_end dut (
    .clk800 (tree_clk), .byteclk, .phase, .rst, .clr_i (clr), .pos_i (pos),
    .rx_serial_i (line_in), .tx_serial_o (line_out), .rx_byte_o (rx_byte),
    .core_byte_i (out_q), .tx_frame_i (pos == 4'd2), .ready_o (ready),
    .byte_sync_o (bs), .frame_sync_o (fs), .early_o (early), .late_o (late),
    .vote_o (vote), .cal_tx_o (cal_tx), .prbs_mode_i (prbs_mode),
    .prbs_err_o (perr), .prbs_bytes_o (pbytes)
  );

  port_card_model #(.PORT (7), .BIT_DELAY (5), .START_PH (-4), .LOOPBACK (1)) u_pc (
    .clk800 (vco), .gframe, .prbs (m_prbs), .prbs_chk (m_chk), .inject_err (m_inj),
    .line_o (line_in), .line_i (line_out), .n_rx_data, .n_rx_err, .n_adjust,
    .n_slip, .n_rx_cal, .n_tx_idle, .n_prbs_err (n_perr), .n_prbs_bits (n_pbits),
    .rx_locked (m_locked), .data_mode (m_data), .pre_cal (m_pre)
  );

  // stand-in for the controller and the switch core
  always @(posedge byteclk) begin
    if (rst) begin
      pos <= '0; en <= 0; in_q <= '0; out_q <= '0;
    end else begin
      pos   <= (pos == 4'd8) ? '0 : pos + 1'b1;
      if (pos == 4'd8) en <= ready;
      in_q  <= en ? rx_byte : ((pos == 4'd0) ? 8'h80 : 8'h00);
      out_q <= in_q;
      if (pos == 4'd0) gframe <= gframe + 1;
      if (vote) n_votes++;
      if (cal_tx && en) n_sub++;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, d0, e0;
    repeat (40) @(posedge vco);
    @(posedge byteclk);
    rst <= 0;
    t = 0;
    while (!(ready && m_data) && t < 20000) begin @(posedge byteclk); t++; end
    chk(ready && m_data, "link pair synchronised");
    $display("synchronised after %0d byte clocks, %0d phase steps, %0d slips",
             t, n_adjust, n_slip);
    d0 = n_rx_data;
    repeat (9 * 200) @(posedge byteclk);
    chk(n_rx_err == 0, $sformatf("%0d bad bytes received by the port chip", n_rx_err));
    chk(n_rx_data - d0 > 120, $sformatf("%0d data frames returned", n_rx_data - d0));
    chk(n_votes > 0, "early/late votes taken");
    chk(n_adjust > 0, "phase adjusted");
    chk(n_slip > 0, "frames slipped");
    chk(n_sub > 0, "idle frames replaced by calibration frames");
    // PRBS-7 self-test
    prbs_mode <= 1;
    repeat (20) @(posedge byteclk);
    chk(!ready, "link not ready during the self-test");
    m_prbs = 1;
    repeat (20) @(posedge byteclk);
    m_chk = 1;
    e0 = int'(perr);
    repeat (300) @(posedge byteclk);
    chk(int'(perr) == e0, "no PRBS errors at the crossbar end");
    chk(pbytes > 300, "PRBS bytes checked at the crossbar end");
    chk(n_perr == 0 && n_pbits > 2000, "no PRBS errors at the port end");
    m_inj = 1;
    repeat (30) @(posedge byteclk);
    chk(int'(perr) == e0 + 3, $sformatf("injected error counted as %0d", int'(perr) - e0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
