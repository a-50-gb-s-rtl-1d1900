// tb_xbar_top: end-to-end test of the crossbar chip at its full size.
//
// Thirty-two behavioural port chips (port_card_model) are attached to the
// 32 serial links of xbar_top, which runs with its default parameters on an
// 800 MHz clock (1.6 Gb/s per line). The test goes through:
//   1. power-up calibration of all 32 link pairs: bit offsets 0..7 on the
//      lines, clock phase errors that the early/late votes must walk back,
//      frame slips to line up with the common framing, and one port (5) that
//      keeps sending its 11000001 pre-calibration pattern for a long time and
//      must neither synchronise nor be enabled meanwhile;
//   2. switching: every port sends frames with pseudo-random reverse
//      routing tags that change every 8 frames, with two idle frames at the
//      start of each 8; every received data frame is checked for its source
//      and payload, so unicast, multicast and idle-frame replacement are all
//      exercised through the serial links and the switch core;
//   3. the PRBS-7 self-test on links 0..3, both directions, with one
//      injected bit error that the crossbar's checker must count;
//   4. recalibration of all links, and switching again;
//   5. link 31 switched to work as a smart end, looped to the chip's own
//      link 30 through modelled lines and phase interpolators: the pair must
//      come up, its phase codes settle, and its frames come back through
//      the switch core (port 30 routes to itself).
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_xbar_top;
  import xbar_pkg::*;

  logic vco_clk = 0, scan_clk = 0, scan_mode = 0, rst = 1, recal = 0, prbs_mode = 0;
  logic [NPORTS-1:0] rx_serial, tx_serial;
  logic byteclk;
  logic [BPOS_W-1:0] pos;
  logic [NPORTS-1:0] port_en, link_ready, link_vote, link_bs, link_fs, link_early,
                     link_late, link_cal_tx;
  logic [NPORTS-1:0][TAG_W-1:0] route;
  logic [NPORTS-1:0][15:0] prbs_err, prbs_bytes;
  logic [5:0] n_enabled;
  logic [NPORTS-1:0] smart_mode = '0, smart_frame, smart_ready, smart_rx_shift, smart_tx_shift;
  logic [NPORTS-1:0][BYTE_W-1:0] smart_data, smart_rx_data;
  logic [NPORTS-1:0][BPOS_W-1:0] smart_rx_pos;
  logic [NPORTS-1:0][5:0] smart_rx_code, smart_tx_code;
  logic [NPORTS-1:0] m_line;

  always #0.625 vco_clk = ~vco_clk;

  xbar_top dut (
    .vco_clk, .scan_clk, .scan_mode, .rst, .recal, .prbs_mode,
    .rx_serial, .tx_serial, .byteclk, .pos, .port_en, .link_ready,
    .link_vote, .link_byte_sync (link_bs), .link_frame_sync (link_fs),
    .link_early, .link_late, .route, .link_cal_tx, .prbs_err, .prbs_bytes,
    .n_enabled, .smart_mode, .smart_data, .smart_frame, .smart_rx_data,
    .smart_rx_pos, .smart_ready, .smart_rx_code, .smart_tx_code,
    .smart_rx_shift, .smart_tx_shift
  );

  int gframe = 0;
  logic [NPORTS-1:0] m_prbs = '0, m_chk = '0, m_inj = '0;
  int n_rx_data [NPORTS], n_rx_err [NPORTS], n_adjust [NPORTS], n_slip [NPORTS];
  int n_rx_cal [NPORTS], n_tx_idle [NPORTS], n_perr [NPORTS], n_pbits [NPORTS];
  logic [NPORTS-1:0] m_locked, m_data, m_pre;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    port_card_model #(
      .PORT (p), .BIT_DELAY (p % 8), .START_PH ((p % 9) - 4),
      .IDLE_HOLD ((p == 5) ? 1500 : 0)
    ) u_pc (
      .clk800 (vco_clk), .gframe (gframe), .prbs (m_prbs[p]), .prbs_chk (m_chk[p]),
      .inject_err (m_inj[p]), .line_o (m_line[p]), .line_i (tx_serial[p]),
      .n_rx_data (n_rx_data[p]), .n_rx_err (n_rx_err[p]), .n_adjust (n_adjust[p]),
      .n_slip (n_slip[p]), .n_rx_cal (n_rx_cal[p]), .n_tx_idle (n_tx_idle[p]),
      .n_prbs_err (n_perr[p]), .n_prbs_bits (n_pbits[p]),
      .rx_locked (m_locked[p]), .data_mode (m_data[p]), .pre_cal (m_pre[p])
    );
  end

  // Loop test of a smart end: link 31 works as a smart end and talks to the
  // crossbar's own link 30 through two lines with whole-bit delays. The
  // phase interpolators are modelled by their effect, with hidden targets:
  // while a 90-degree shift is asked for, the bits of the alternating timing
  // bytes come out inverted when that clock is late, unchanged when early,
  // and alternating frame by frame on target.
  localparam int SM = 31, SD = 30;
  localparam logic [5:0] SM_RX_TGT = 6'd3, SM_TX_TGT = 6'd61;
  bit sm_loop = 0, sm_tog = 0;
  logic [63:0] sm_s2d = '0, sm_d2s = '0, sm_tag = '0;
  logic sm_dtag = 0;

  function automatic bit sm_late(logic [5:0] code, logic [5:0] tgt);
    logic signed [5:0] e = signed'(code - tgt);
    return (e > 0) || (e == 0 && sm_tog);
  endfunction

  always @(posedge byteclk) if (pos == '0) sm_tog <= ~sm_tog;
  always @(posedge vco_clk)
    if (dut.phase == 2'd1)
      sm_dtag <= dut.g_link[SD].u_link.cal_tx_o
              && dut.g_link[SD].u_link.u_framer.pos_q >= BPOS_W'(3);
  always @(vco_clk) begin
    #0.3125;
    sm_s2d = {sm_s2d[62:0], tx_serial[SM]
              ^ (smart_tx_shift[SM] && sm_late(smart_tx_code[SM], SM_TX_TGT))};
    sm_d2s = {sm_d2s[62:0], tx_serial[SD]};
    sm_tag = {sm_tag[62:0], sm_dtag};
  end
  always_comb begin
    rx_serial = m_line;
    if (sm_loop) begin
      rx_serial[SD] = sm_s2d[13];
      rx_serial[SM] = sm_d2s[27]
                    ^ (smart_rx_shift[SM] && sm_tag[27]
                       && sm_late(smart_rx_code[SM], SM_RX_TGT));
    end
  end

  // smart end data: frames to itself (tag 30 routes output 30 from input 30)
  int sm_f = 0, sm_good = 0, sm_bad = 0, sm_slips = 0, sm_steps = 0;
  int sm_got;
  logic [BPOS_W-1:0] sm_tpos = '0;
  bit sm_in_data = 0;
  function automatic logic [7:0] sm_pay(int f, int p);
    return 8'((f * 37 + p * 11 + 3) & 8'hFF);
  endfunction
  always_comb begin
    smart_data = '0;
    smart_data[SM] = smart_frame[SM] ? ((sm_f % 3 == 0) ? 8'h80 : {1'b0, 5'(SD), 2'b00})
                                     : sm_pay(sm_f, int'(sm_tpos));
  end
  always @(posedge byteclk) begin
    sm_tpos <= smart_frame[SM] ? BPOS_W'(1)
             : (sm_tpos == BPOS_W'(FRAME_BYTES - 1)) ? '0 : sm_tpos + 1'b1;
    if (smart_frame[SM]) sm_f <= sm_f + 1;
    if (dut.g_link[SM].g_smart.u_smart.slip_o) sm_slips++;
    if (dut.g_link[SM].g_smart.u_smart.rx_step_o || dut.g_link[SM].g_smart.u_smart.tx_step_o)
      sm_steps++;
    if (smart_ready[SM]) begin
      if (smart_rx_pos[SM] == '0) sm_in_data = smart_rx_data[SM] == {1'b0, 5'(SD), 2'b00};
      if (sm_in_data && smart_rx_pos[SM] == BPOS_W'(1)) begin
        sm_got = -1;
        for (int f = sm_f - 8; f <= sm_f; f++)
          if (sm_pay(f, 1) == smart_rx_data[SM]) sm_got = f;
      end
      if (sm_in_data && smart_rx_pos[SM] != '0) begin
        if (sm_got >= 0 && smart_rx_data[SM] == sm_pay(sm_got, int'(smart_rx_pos[SM]))) sm_good++;
        else sm_bad++;
      end
    end
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_votes = 0, n_idle_sub = 0, n_multicast = 0, n_unicast = 0, n_nolock = 0;
  int n_disabled_wait = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic mech(int n, string what);
    $display("mechanism %-32s %0d", what, n);
    check(n > 0, {"mechanism never happened: ", what});
  endtask

  always @(posedge byteclk) begin
    cyc <= cyc + 1;
    if (!rst && pos == '0) gframe <= gframe + 1;
    if (!rst) begin
      n_votes    += $countones(link_vote);
      n_idle_sub += $countones(link_cal_tx & port_en);
    end
  end

  // port 5 still repeats 11000001: its link must not lock on it
  always @(posedge byteclk) begin
    if (!rst && m_pre[5] && !m_prbs[5]) begin
      n_nolock++;
      if (link_bs[5] || port_en[5]) begin
        failures++;
        $display("FAIL: port 5 synchronised on the pre-calibration pattern");
      end
    end
    if (!rst && !port_en[5] && n_enabled >= 6'd31) n_disabled_wait++;
  end

  function automatic int sum(int a [NPORTS]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  task automatic wait_all_enabled(int limit, string what);
    int t = 0;
    while (!(port_en == '1 && m_data == '1) && t < limit) begin
      @(posedge byteclk);
      t++;
    end
    check(port_en == '1 && m_data == '1, {"all ports enabled: ", what});
    $display("all 32 ports enabled after %0d byte clocks (%s)", t, what);
  endtask

  task automatic count_routing(int epochs_from, int epochs_to);
    for (int e = epochs_from; e < epochs_to; e++) begin
      int cnt [NPORTS];
      foreach (cnt[i]) cnt[i] = 0;
      for (int p = 0; p < NPORTS; p++) begin
        int t;
        t = g_port[0].u_pc.tag_of(p, e);
        cnt[t]++;
      end
      foreach (cnt[i]) begin
        if (cnt[i] > 1) n_multicast++;
        if (cnt[i] == 1) n_unicast++;
      end
    end
  endtask

  initial begin
    int e0, rx0, err0;
    int err_snap [NPORTS];
    logic [15:0] perr0 [4];
    repeat (40) @(posedge vco_clk);
    @(posedge byteclk);
    rst <= 1'b0;

    // 1 + 2: calibration, then switching
    wait_all_enabled(30000, "power-up");
    check(n_disabled_wait > 0, "port 5 stayed disabled while the others ran");
    repeat (18) @(posedge byteclk);
    e0  = gframe / 8 + 1;
    rx0 = sum(n_rx_data);
    repeat (9 * 8 * 24) @(posedge byteclk);
    count_routing(e0, gframe / 8);
    for (int p = 0; p < NPORTS; p++) begin
      check(n_rx_err[p] == 0, $sformatf("port %0d received %0d bad bytes", p, n_rx_err[p]));
      check(n_rx_data[p] > 0, $sformatf("port %0d received data frames", p));
    end
    $display("data frames received: %0d", sum(n_rx_data) - rx0);
    // raw rate: 6 data frames of every 8 carry 8 bytes per port
    check(sum(n_rx_data) - rx0 > 32 * 24 * 6 * 3 / 4, "data frame rate");

    // 3: PRBS-7 self-test of links 0..3
    // the crossbar enters the test first and takes links 0..3 out of the
    // switch; its checkers count the switch-over, so only later errors count
    prbs_mode <= 1'b1;
    repeat (20) @(posedge byteclk);
    check(port_en[3:0] == 4'h0 && port_en[31:4] == '1, "PRBS links leave the switch");
    m_prbs[3:0] = 4'hF;
    repeat (20) @(posedge byteclk);
    m_chk[3:0] = 4'hF;
    for (int p = 0; p < 4; p++) perr0[p] = prbs_err[p];
    repeat (300) @(posedge byteclk);
    for (int p = 0; p < 4; p++) begin
      check(prbs_err[p] == perr0[p], $sformatf("crossbar PRBS errors on link %0d: %0d", p, prbs_err[p] - perr0[p]));
      check(prbs_bytes[p] > 250, $sformatf("crossbar PRBS bytes on link %0d", p));
      check(n_perr[p] == 0, $sformatf("port PRBS errors on link %0d", p));
      check(n_pbits[p] > 2000, $sformatf("port PRBS bits on link %0d", p));
    end
    err0 = int'(prbs_err[0]);
    m_inj[0] = 1'b1;
    repeat (40) @(posedge byteclk);
    m_inj[0] = 1'b0;
    check(prbs_err[0] == 16'(err0 + 3), $sformatf("injected error seen as 3 bit errors, got %0d", prbs_err[0]));
    check(prbs_err[1] == perr0[1], "no PRBS errors on link 1");
    prbs_mode <= 1'b0;
    m_chk[3:0] = 4'h0;
    m_prbs[3:0] = 4'h0;
    // links 4..31 kept switching among themselves; ports 0..3 saw the
    // crossbar's PRBS stream on their framed receivers, which is not checked
    for (int p = 4; p < NPORTS; p++)
      check(n_rx_err[p] == 0, $sformatf("port %0d bad bytes during the PRBS test", p));

    // 4: recalibrate every link, then switch again
    @(posedge byteclk);
    recal <= 1'b1;
    @(posedge byteclk);
    recal <= 1'b0;
    repeat (12) @(posedge byteclk);
    check(port_en == '0, "recalibration disables every port");
    wait_all_enabled(30000, "after recalibration");
    repeat (18) @(posedge byteclk);
    err_snap = n_rx_err;
    rx0 = sum(n_rx_data);
    e0  = gframe / 8 + 1;
    repeat (9 * 8 * 8) @(posedge byteclk);
    count_routing(e0, gframe / 8);
    for (int p = 0; p < NPORTS; p++)
      check(n_rx_err[p] == err_snap[p], $sformatf("port %0d bad bytes after recalibration", p));
    check(sum(n_rx_data) > rx0 + 32 * 8 * 6 / 2, "data frames after recalibration");

    // 5: link 31 as a smart end in a loop with link 30. The port models that
    // now pick input 30 receive the smart end's frames and print them as
    // unexpected; their counts are not checked from here on.
    @(posedge byteclk);
    smart_mode[SM] <= 1'b1;
    sm_loop        <= 1'b1;
    recal          <= 1'b1;
    @(posedge byteclk);
    recal <= 1'b0;
    begin
      int t;
      t = 0;
      while (!(smart_ready[SM] && port_en[SD]) && t < 6000) begin
        @(posedge byteclk);
        t++;
      end
      $display("smart end loop ready after %0d byte clocks", t);
    end
    check(smart_ready[SM], "smart end 31 ready");
    check(port_en[SD], "port 30 enabled with a smart end as its partner");
    check(!port_en[SM], "port 31 kept out of the switch while a smart end");
    repeat (9 * 60) @(posedge byteclk);
    sm_good = 0; sm_bad = 0;
    repeat (9 * 60) @(posedge byteclk);
    $display("smart end: codes %0d/%0d (targets %0d/%0d), looped bytes %0d good %0d bad, slips %0d",
             smart_rx_code[SM], smart_tx_code[SM], SM_RX_TGT, SM_TX_TGT, sm_good, sm_bad, sm_slips);
    check(sm_bad == 0 && sm_good > 8 * 30, "smart end frames looped through the switch core");
    check(signed'(6'(smart_rx_code[SM] - SM_RX_TGT)) >= -6'sd2
          && signed'(6'(smart_rx_code[SM] - SM_RX_TGT)) <= 6'sd2, "smart receive code settled");
    check(signed'(6'(smart_tx_code[SM] - SM_TX_TGT)) >= -6'sd2
          && signed'(6'(smart_tx_code[SM] - SM_TX_TGT)) <= 6'sd2, "smart transmit code settled");

    mech(sm_steps,         "smart end phase steps");
    mech(sm_slips,         "smart end frame slips");
    mech(n_votes,          "early/late votes");
    mech(sum(n_adjust),    "clock phase adjustments");
    mech(sum(n_slip),      "frame slips");
    mech(n_nolock,         "no lock on 11000001");
    mech(n_disabled_wait,  "unsynchronised port disabled");
    mech(n_idle_sub,       "idle frames replaced");
    mech(n_multicast,      "multicast");
    mech(n_unicast,        "unicast");
    mech(sum(n_rx_cal),    "calibration frames received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
