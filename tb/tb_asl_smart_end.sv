// tb_asl_smart_end: a smart end brought up against a real crossbar link.
//
// asl_smart_end is connected to an asl_dumb_end through two modelled lines.
// Each line delays the bits by a random whole number of bits, so both
// receivers see random bit offsets and the frames of the smart end start at
// a random byte of the crossbar's frame. The phase interpolators are modelled
// by their effect: each side has a hidden target code; while the smart end
// asks for a 90-degree shift, a bit is inverted when the clock concerned is
// late (code above target), passed unchanged when early, and alternates
// frame by frame when on target, which is what sampling a 0101 pattern on
// its transitions gives. Each of several trials checks:
//   * the crossbar receiver never synchronises while the smart end sends its
//     pre-calibration pattern, and the smart receiver is bit-synchronised
//     (its code near the target) before it starts calibrating;
//   * both ends become ready within a bounded time, with slips where the
//     frame offset needs them;
//   * both interpolator codes end within two steps of their targets (the
//     loops dither around the target, and a vote takes effect a frame or
//     two later);
//   * data frames sent either way arrive intact, one frame per nine byte
//     clocks.
module tb_asl_smart_end;
  import xbar_pkg::*;

  logic vco_clk = 0, rst = 1;
  logic tree_clk, byteclk;
  logic [1:0] phase;
  always #0.625 vco_clk = ~vco_clk;

  byte_clock_gen u_clk (
    .vco_clk (vco_clk), .scan_clk (1'b0), .scan_mode (1'b0),
    .tree_clk (tree_clk), .byteclk (byteclk), .phase (phase)
  );

  // crossbar side: frame position counter and data source
  logic [BPOS_W-1:0] pos = '0;
  logic [BYTE_W-1:0] d_core, d_rx;
  logic d_tx, d_ready, d_bs, d_fs, d_early, d_late, d_vote, d_cal;
  logic [15:0] d_perr, d_pbytes;
  logic s_tx, s_rx, d_rxl;

  asl_dumb_end #(.HAS_PRBS(0)) u_dumb (
    .clk800 (tree_clk), .byteclk (byteclk), .phase (phase), .rst (rst),
    .clr_i (1'b0), .pos_i (pos), .rx_serial_i (d_rxl), .tx_serial_o (d_tx),
    .rx_byte_o (d_rx), .core_byte_i (d_core), .tx_frame_i (pos == '0),
    .ready_o (d_ready), .byte_sync_o (d_bs), .frame_sync_o (d_fs),
    .early_o (d_early), .late_o (d_late), .vote_o (d_vote), .cal_tx_o (d_cal),
    .prbs_mode_i (1'b0), .prbs_err_o (d_perr), .prbs_bytes_o (d_pbytes)
  );

  logic [BYTE_W-1:0] s_data, s_rxb;
  logic [BPOS_W-1:0] s_rpos;
  logic s_frame, s_ready, s_pre, s_rbs, s_rfs, s_fbs, s_ffs, s_slip, s_rstep, s_tstep;
  logic [5:0] rx_code, tx_code;
  logic rx_shift, tx_shift;

  asl_smart_end u_dut (
    .clk800 (tree_clk), .byteclk (byteclk), .phase (phase), .rst (rst),
    .clr_i (1'b0), .rx_serial_i (s_rx), .tx_serial_o (s_tx),
    .data_i (s_data), .tx_frame_o (s_frame), .rx_byte_o (s_rxb), .rx_pos_o (s_rpos),
    .ready_o (s_ready), .precal_o (s_pre), .rx_byte_sync_o (s_rbs),
    .rx_frame_sync_o (s_rfs), .far_byte_sync_o (s_fbs), .far_frame_sync_o (s_ffs),
    .slip_o (s_slip), .rx_step_o (s_rstep), .tx_step_o (s_tstep),
    .rx_code_o (rx_code), .tx_code_o (tx_code),
    .rx_shift_o (rx_shift), .tx_shift_o (tx_shift)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- line and interpolator models ----------------
  int s2d_dly, d2s_dly;            // bits
  logic [5:0] rx_tgt, tx_tgt;
  logic [63:0] s2d_q = '0, d2s_q = '0, tag_q = '0;
  logic d_tag = 0;   // the crossbar is sending a timing byte of a calibration frame

  always @(posedge tree_clk)
    if (phase == 2'd1) d_tag <= u_dumb.cal_tx_o && u_dumb.u_framer.pos_q >= BPOS_W'(3);
  logic tie_tog = 0;

  function automatic int err(logic [5:0] code, logic [5:0] tgt);
    logic signed [5:0] e = signed'(code - tgt);
    return int'(e);
  endfunction

  function automatic logic late_flip(int e);
    return (e > 0) || (e == 0 && tie_tog);
  endfunction

  always @(posedge byteclk) if (pos == '0) tie_tog <= ~tie_tog;

  // Bits are put on the lines a quarter clock period after each edge.
  always @(vco_clk) begin
    #0.3125;
    s2d_q = {s2d_q[62:0], s_tx ^ (tx_shift && late_flip(err(tx_code, tx_tgt)))};
    d2s_q = {d2s_q[62:0], d_tx};
    tag_q = {tag_q[62:0], d_tag};
  end
  assign d_rxl = s2d_q[s2d_dly];
  // Only the alternating timing bytes are sampled on their transitions.
  assign s_rx  = d2s_q[d2s_dly]
               ^ (rx_shift && tag_q[d2s_dly] && late_flip(err(rx_code, rx_tgt)));

  // ---------------- data sources ----------------
  int d_fcnt = 0, s_fcnt = 0;
  logic [BPOS_W-1:0] s_tpos = '0;
  always @(posedge byteclk) begin
    pos <= (pos == BPOS_W'(FRAME_BYTES - 1)) ? '0 : pos + 1'b1;
    if (pos == BPOS_W'(FRAME_BYTES - 1)) d_fcnt <= d_fcnt + 1;
    s_tpos <= s_frame ? BPOS_W'(1) : (s_tpos == BPOS_W'(FRAME_BYTES - 1)) ? '0 : s_tpos + 1'b1;
    if (s_frame) s_fcnt <= s_fcnt + 1;
  end
  function automatic logic [7:0] pay(int f, int p, int salt);
    return 8'((f * 29 + p * 7 + salt) & 8'hFF);
  endfunction
  // Every third frame is idle (it goes out as a calibration frame).
  always_comb begin
    d_core = (pos == '0) ? ((d_fcnt % 3 == 0) ? 8'h80 : 8'h00)
                         : pay(d_fcnt, int'(pos), 5);
    s_data = s_frame ? ((s_fcnt % 3 == 0) ? 8'h80 : 8'h00)
                     : pay(s_fcnt, int'(s_tpos), 11);
  end

  // ---------------- receive checkers ----------------
  int s_good = 0, s_bad = 0, d_good = 0, d_bad = 0;
  int n_slip = 0, n_rstep = 0, n_tstep = 0, n_nolock = 0;
  int s_hdr_gap = 0, s_gap_bad = 0;
  bit s_in_data = 0, d_in_data = 0;
  int s_got_f, d_got_f;
  int pre_exit_err = 99;
  logic s_pre_d = 1;
  always @(posedge byteclk) begin
    s_pre_d <= s_pre;
    if (s_pre_d && !s_pre && !rst) pre_exit_err = err(rx_code, rx_tgt);
    if (!rst) begin
      if (s_slip)  n_slip++;
      if (s_rstep) n_rstep++;
      if (s_tstep) n_tstep++;
      if (s_pre && (d_bs || d_fs)) n_nolock++;
      if (s_ready) begin
        // tx_frame_o every nine byte clocks once ready
        if (s_hdr_gap >= 0) s_hdr_gap++;
        if (s_frame) begin
          if (s_hdr_gap > 0 && s_hdr_gap != FRAME_BYTES) s_gap_bad++;
          s_hdr_gap = 0;
        end
      end
      // smart receiver: data frames carry pay(f, pos, 5) for some frame f
      if (s_ready && s_rpos == '0) s_in_data = !s_rxb[7] && s_rxb == 8'h00;
      if (s_ready && s_in_data && s_rpos == BPOS_W'(1)) begin
        s_got_f = -1;
        for (int f = d_fcnt - 8; f <= d_fcnt; f++) if (pay(f, 1, 5) == s_rxb) s_got_f = f;
      end
      if (s_ready && s_in_data && s_rpos != '0) begin
        if (s_got_f >= 0 && s_rxb == pay(s_got_f, int'(s_rpos), 5)) s_good++;
        else s_bad++;
      end
      // crossbar receiver
      if (d_ready && pos == '0) d_in_data = d_rx == 8'h00;
      if (d_ready && d_in_data && pos == BPOS_W'(1)) begin
        d_got_f = -1;
        for (int f = s_fcnt - 8; f <= s_fcnt; f++) if (pay(f, 1, 11) == d_rx) d_got_f = f;
      end
      if (d_ready && d_in_data && pos != '0) begin
        if (d_got_f >= 0 && d_rx == pay(d_got_f, int'(pos), 11)) d_good++;
        else d_bad++;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_ready;
    int tot_slip;
    tot_slip = 0;
    for (int trial = 0; trial < 6; trial++) begin
      rst = 1;
      s2d_dly = int'($urandom_range(2, 40));
      d2s_dly = int'($urandom_range(2, 40));
      rx_tgt  = 6'($urandom_range(0, 10) - 5);
      tx_tgt  = 6'($urandom_range(0, 10) - 5);
      if (trial == 0) begin rx_tgt = 6'd4; tx_tgt = 6'd61; end
      repeat (4) @(posedge byteclk);
      rst = 0;
      n_slip = 0; n_rstep = 0; n_tstep = 0; n_nolock = 0;
      t_ready = 0;
      while (!(s_ready && d_ready) && t_ready < 3000) begin
        @(posedge byteclk);
        t_ready++;
      end
      check(s_ready && d_ready, $sformatf("trial %0d: pair ready (%0d byte clocks)", trial, t_ready));
      check(n_nolock == 0, $sformatf("trial %0d: no crossbar lock during pre-calibration", trial));
      check(pre_exit_err >= -2 && pre_exit_err <= 2,
            $sformatf("trial %0d: receiver bit-synchronised (error %0d) before calibrating", trial, pre_exit_err));
      pre_exit_err = 99;
      // let the phase loops settle, then measure data
      repeat (9 * 60) @(posedge byteclk);
      s_good = 0; s_bad = 0; d_good = 0; d_bad = 0; s_gap_bad = 0; s_hdr_gap = -1;
      repeat (9 * 60) @(posedge byteclk);
      $display("trial %0d: dly %0d/%0d tgt %0d/%0d codes %0d/%0d slips %0d steps %0d/%0d ready@%0d data %0d/%0d bad %0d/%0d",
               trial, s2d_dly, d2s_dly, rx_tgt, tx_tgt, rx_code, tx_code, n_slip,
               n_rstep, n_tstep, t_ready, s_good, d_good, s_bad, d_bad);
      check(err(rx_code, rx_tgt) >= -2 && err(rx_code, rx_tgt) <= 2,
            $sformatf("trial %0d: receive code %0d near target %0d", trial, rx_code, rx_tgt));
      check(err(tx_code, tx_tgt) >= -2 && err(tx_code, tx_tgt) <= 2,
            $sformatf("trial %0d: transmit code %0d near target %0d", trial, tx_code, tx_tgt));
      check(s_bad == 0 && s_good > 8 * 30, $sformatf("trial %0d: data crossbar to smart end", trial));
      check(d_bad == 0 && d_good > 8 * 30, $sformatf("trial %0d: data smart end to crossbar", trial));
      check(s_gap_bad == 0, $sformatf("trial %0d: one frame per nine byte clocks", trial));
      check(s_ready && d_ready, $sformatf("trial %0d: pair stays ready", trial));
      tot_slip += n_slip;
    end
    check(tot_slip > 0, "frame slips happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
