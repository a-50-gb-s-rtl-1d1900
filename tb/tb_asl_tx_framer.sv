// tb_asl_tx_framer: checks what the link transmitter sends, frame by frame.
// The switch core side offers random frames (some with the idle bit set)
// while ready_i is toggled between frames and inside frames. Each frame must
// be, as a whole and one byte clock later, either the core's frame (ready
// and not idle, decided at the header) or a calibration frame: control byte
// {1, early, late, byte sync, frame sync, 000}, 11001111, 00001100 and six
// 01010101 bytes.
module tb_asl_tx_framer;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, tx_frame = 0, ready = 0, early = 0, late = 0, bs = 0, fs = 0;
  logic [BYTE_W-1:0] core_byte = '0, tx_byte;
  logic cal;
  int checks = 0, failures = 0, n_cal = 0, n_data = 0, n_idle_sub = 0;

  always #2.5 clk = ~clk;

  asl_tx_framer dut (.clk, .rst, .tx_frame_i (tx_frame), .core_byte_i (core_byte),
                     .ready_i (ready), .early_i (early), .late_i (late),
                     .byte_sync_i (bs), .frame_sync_i (fs), .tx_byte_o (tx_byte),
                     .cal_o (cal));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic is_cal;
    logic [BYTE_W-1:0] expb, prev_exp;
    logic prev_cal, have_prev;
    ctrl_byte_t c;
    have_prev = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 80; f++) begin
      for (int b = 0; b < 9; b++) begin
        @(negedge clk);
        // the output now shows the byte offered one cycle ago
        if (have_prev) begin
          chk(tx_byte == prev_exp && cal == prev_cal,
              $sformatf("frame %0d byte %0d: %02h expected %02h", f, b, tx_byte, prev_exp));
        end
        tx_frame = (b == 0);
        core_byte = (b == 0) ? {1'($urandom % 4 == 0), 7'($urandom)} : 8'($urandom);
        if ($urandom % 7 == 0) ready = ~ready;
        {early, late, bs, fs} = 4'($urandom);
        if (b == 0) begin
          is_cal = !ready || core_byte[7];
          if (is_cal) n_cal++; else n_data++;
          if (is_cal && ready) n_idle_sub++;
        end
        c = '{idle: 1'b1, clk_early: early, clk_late: late, byte_sync: bs,
              frame_sync: fs, rsvd: 3'b000};
        if (!is_cal) expb = core_byte;
        else case (b)
          0: expb = c;
          1: expb = SYNC_BYTE0;
          2: expb = SYNC_BYTE1;
          default: expb = TIMING_BYTE;
        endcase
        prev_exp = expb;
        prev_cal = is_cal;
        have_prev = 1;
      end
    end
    chk(n_cal > 0 && n_data > 0 && n_idle_sub > 0, "calibration, data and replaced idle frames all sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
