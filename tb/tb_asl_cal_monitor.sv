// tb_asl_cal_monitor: checks the early/late majority vote and the control
// byte reader. Calibration frames are fed with a chosen number of timing bits
// (out of the 32 in bytes five to eight) equal to 01010101; early must follow
// a majority of such bits, late a minority, neither a tie, and the vote must
// be taken once per calibration frame, after its ninth byte. Data frames and
// frames received without frame sync must change nothing.
module tb_asl_cal_monitor;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, clr = 0, fs = 0;
  logic [BYTE_W-1:0] rx_byte = '0;
  logic [BPOS_W-1:0] pos = '0;
  logic early, late, vote, far_bs, far_fs;
  int checks = 0, failures = 0, n_votes = 0;

  always #2.5 clk = ~clk;

  asl_cal_monitor dut (.clk, .rst, .clr_i (clr), .rx_byte_i (rx_byte), .pos_i (pos),
                       .frame_sync_i (fs), .early_o (early), .late_o (late),
                       .vote_o (vote), .far_byte_sync_o (far_bs),
                       .far_frame_sync_o (far_fs));

  always @(posedge clk) if (vote) n_votes++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    chk(n_votes == 60, $sformatf("%0d votes for 60 calibration frames", n_votes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one frame; nmatch of the 32 vote bits equal the timing pattern
  task automatic frame(bit idle, bit bs, bit fsb, int nmatch);
    logic [31:0] m;
    m = '0;
    for (int i = 0; i < nmatch; i++) m[i] = 1'b1;
    for (int i = 31; i > 0; i--) begin  // shuffle
      int j;
      logic t;
      j = $urandom % (i + 1);
      t = m[i]; m[i] = m[j]; m[j] = t;
    end
    for (int b = 0; b < 9; b++) begin
      @(negedge clk);
      pos = BPOS_W'(b);
      if (b == 0) rx_byte = {idle, 1'($urandom), 1'($urandom), bs, fsb, 3'($urandom)};
      else if (b >= 4 && b <= 7) rx_byte = TIMING_BYTE ^ ~m[8*(b-4) +: 8];
      else if (b == 8) rx_byte = ~TIMING_BYTE;  // ninth byte is not voted on
      else rx_byte = 8'($urandom);
    end
  endtask

  initial begin
    int nm, v0;
    logic e0, l0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fs = 1;
    for (int f = 0; f < 60; f++) begin
      bit bs, fsb;
      nm = (f % 3 == 0) ? 16 : $urandom % 33;
      bs = 1'($urandom); fsb = 1'($urandom);
      v0 = n_votes;
      frame(1'b1, bs, fsb, nm);
      @(negedge clk);
      pos = '0;
      rx_byte = 8'h00;   // next frame starts with a data header
      #0.1;
      chk(vote, "vote taken after the ninth byte");
      chk(early == (nm > 16) && late == (nm < 16),
          $sformatf("vote with %0d of 32 early bits: early %b late %b", nm, early, late));
      chk(far_bs == bs && far_fs == fsb, "far end status read from the control byte");
      // a data frame and a frame without frame sync change nothing
      e0 = early; l0 = late;
      @(negedge clk);
      v0 = n_votes;
      frame(1'b0, !bs, !fsb, 32 - nm);
      fs = 0;
      frame(1'b1, !bs, !fsb, 32 - nm);
      fs = 1;
      @(negedge clk);
      pos = '0;
      rx_byte = 8'h00;
      #0.1;
      chk(n_votes == v0 && early == e0 && late == l0 && far_bs == bs && far_fs == fsb,
          "data frames and unsynchronised frames ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
