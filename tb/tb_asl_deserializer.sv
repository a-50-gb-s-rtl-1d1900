// tb_asl_deserializer: checks the serial-to-parallel converter.
// A random bit stream is driven at 1.6 Gb/s, changing a quarter period after
// each 800 MHz clock edge. The words read at each byte clock must be the
// stream cut into eight-bit pieces, earliest bit most significant, eight new
// bits per byte clock, at one fixed bit offset.
module tb_asl_deserializer;
  import xbar_pkg::*;
  logic vco = 0, rst = 1, rx_bit = 0;
  logic tree_clk, byteclk;
  logic [1:0] phase;
  logic [BYTE_W-1:0] word;
  int checks = 0, failures = 0;

  always #0.625 vco = ~vco;

  byte_clock_gen u_clk (.vco_clk (vco), .scan_clk (1'b0), .scan_mode (1'b0),
                        .tree_clk, .byteclk, .phase);
  asl_deserializer dut (.rx_clk (tree_clk), .rst, .phase, .rx_bit, .word_o (word));

  bit bits [$];
  logic [BYTE_W-1:0] words [$];

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(vco) begin
    bit b;
    #0.3125;
    b = 1'($urandom);
    rx_bit <= b;
    bits.push_back(b);
  end

  always @(posedge byteclk) if (!rst) words.push_back(word);

  initial begin
    int found;
    logic [BYTE_W-1:0] w;
    repeat (8) @(posedge byteclk);
    rst <= 0;
    repeat (200) @(posedge byteclk);
    // find the bit offset from the first words, then check every word
    found = -1;
    for (int off = 0; off < 120 && found < 0; off++) begin
      int ok;
      ok = 1;
      for (int k = 4; k < 24; k++) begin
        for (int i = 0; i < 8; i++) w[7-i] = bits[off + 8*k + i];
        if (w != words[k]) ok = 0;
      end
      if (ok) found = off;
    end
    checks++;
    if (found < 0) begin
      failures++;
      $display("FAIL: words do not match the bit stream");
      found = 0;
    end else $display("words match the bit stream at bit offset %0d", found);
    for (int k = 4; k < 190; k++) begin
      for (int i = 0; i < 8; i++) w[7-i] = bits[found + 8*k + i];
      checks++;
      if (w != words[k]) begin
        failures++;
        if (failures < 5) $display("FAIL: word %0d is %h, expected %h", k, words[k], w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
