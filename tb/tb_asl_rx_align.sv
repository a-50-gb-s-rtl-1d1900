// tb_asl_rx_align: checks byte and frame synchronisation of the receiver.
// Unaligned words are built from a byte stream delayed by K bits (K = 0..7).
// Checked: no lock while the stream is the repeated 11000001 pattern; byte
// sync on calibration frames at every offset; frame sync only when the
// framing bytes line up with the chip-wide position count (two byte clocks
// of latency from word_i to rx_byte_o, three from when this bench applies
// it); the aligned bytes equal the stream;
// and with hold_i set a stream at another offset leaves the offset alone.
module tb_asl_rx_align;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, clr = 0, hold = 0;
  logic [BYTE_W-1:0] word = '0, rx_byte;
  logic [BPOS_W-1:0] pos = '0;
  logic hit, bs, fs;
  logic [2:0] off;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #2.5 clk = ~clk;

  asl_rx_align dut (.clk, .rst, .clr_i (clr), .hold_i (hold), .word_i (word),
                    .pos_i (pos), .rx_byte_o (rx_byte), .hit_o (hit),
                    .bit_off_o (off), .byte_sync_o (bs), .frame_sync_o (fs));

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

  // drive nbytes of a stream; kind 0: 11000001 repeated, 1: calibration frames
  task automatic run(int k, int shift, int kind, int nbytes, bit check_bytes);
    bit bits [$];
    logic [BYTE_W-1:0] bytes [$];
    logic [BYTE_W-1:0] b, w;
    for (int i = 0; i < k; i++) bits.push_back(1'b0);
    for (int j = 0; j < nbytes; j++) begin
      if (kind == 0) b = SMART_IDLE;
      else case (j % 9)
        0: b = {1'b1, 7'($urandom)};
        1: b = SYNC_BYTE0;
        2: b = SYNC_BYTE1;
        default: b = TIMING_BYTE;
      endcase
      bytes.push_back(b);
      for (int i = 7; i >= 0; i--) bits.push_back(b[i]);
    end
    for (int m = 0; m < nbytes; m++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) w[7-i] = bits[8*m + i];
      word = w;
      pos  = BPOS_W'(((m - 3 + shift) % 9 + 9) % 9);
      if (check_bytes && m >= 40 && bs) begin
        #0.1;
        chk(rx_byte == bytes[m - 3], $sformatf("aligned byte %0d", m - 3));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run(3, 0, 0, 200, 0);
    chk(!bs && !fs, "no lock on the 11000001 pattern");
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      run(k, 0, 1, 90, 1);
      chk(bs, $sformatf("byte sync at offset %0d", k));
      chk(fs, $sformatf("frame sync at offset %0d", k));
      chk(off == 3'((8 - k) % 8) || off == 3'(k), $sformatf("bit offset %0d for delay %0d", off, k));
    end
    // framing one byte off the common frame position: no frame sync
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    run(5, 1, 1, 90, 0);
    chk(bs && !fs, "byte sync without frame sync when frames are misplaced");
    // hold: a new offset is ignored
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    run(2, 0, 1, 60, 0);
    chk(bs && fs, "locked before hold");
    hold = 1;
    run(6, 0, 1, 60, 0);
    chk(bs && fs && off == 3'(2), "offset kept while hold_i is set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
