// tb_asl_serializer: checks the parallel-to-serial converter.
// Random bytes are offered in the byte clock domain; the line is sampled in
// the middle of each half of the 800 MHz clock, i.e. once per bit at
// 1.6 Gb/s, and regrouped into bytes. Each byte must appear most significant
// bit first, eight bits per byte clock, with a fixed latency.
module tb_asl_serializer;
  import xbar_pkg::*;
  logic vco = 0, rst = 1;
  logic tree_clk, byteclk, tx_bit;
  logic [1:0] phase;
  logic [BYTE_W-1:0] byte_i = '0;
  int checks = 0, failures = 0;

  always #0.625 vco = ~vco;

  byte_clock_gen u_clk (.vco_clk (vco), .scan_clk (1'b0), .scan_mode (1'b0),
                        .tree_clk, .byteclk, .phase);
  asl_serializer dut (.tx_clk (tree_clk), .rst, .phase, .byte_i, .tx_bit);

  logic [BYTE_W-1:0] sent [$];
  bit bits [$];

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge byteclk) begin
    if (!rst) begin
      byte_i <= 8'($urandom);
      sent.push_back(byte_i);
    end
  end

  // sample a quarter period after every edge
  always @(vco) begin
    #0.3125;
    if (!rst) bits.push_back(tx_bit);
  end

  initial begin
    int found;
    logic [BYTE_W-1:0] b;
    repeat (8) @(posedge byteclk);
    rst <= 0;
    repeat (200) @(posedge byteclk);
    // find the latency (in bits) at which the sent bytes appear
    found = -1;
    for (int off = 0; off < 40 && found < 0; off++) begin
      int ok;
      ok = 1;
      for (int k = 2; k < 22; k++) begin
        for (int i = 0; i < 8; i++) b[7-i] = bits[off + 8*k + i];
        if (b != sent[k]) ok = 0;
      end
      if (ok) found = off;
    end
    checks++;
    if (found < 0) begin
      failures++;
      $display("FAIL: byte stream not found MSB first on the line");
      found = 0;
    end else $display("bytes appear on the line at bit offset %0d", found);
    // then every byte, at that offset
    for (int k = 2; k < 190; k++) begin
      for (int i = 0; i < 8; i++) b[7-i] = bits[found + 8*k + i];
      checks++;
      if (b != sent[k]) begin
        failures++;
        if (failures < 5) $display("FAIL: byte %0d on the line is %h, sent %h", k, b, sent[k]);
      end
    end
    checks++;
    // 8 bits per byte clock: 200 byte clocks give 1600 bit samples
    if (bits.size() < 1598 || bits.size() > 1602) begin
      failures++; $display("FAIL: %0d bits in 200 byte clocks", bits.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
