// tb_prbs7_gen: checks the byte-wide PRBS-7 generator against a bit-serial
// reference of x^7 + x^6 + 1 seeded with all ones, and that the stream
// repeats after 127 bits (every 127 bytes at eight bits a byte).
module tb_prbs7_gen;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [BYTE_W-1:0] byte_o;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  prbs7_gen dut (.clk, .rst, .en, .byte_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] s;
    logic [BYTE_W-1:0] expb;
    logic [BYTE_W-1:0] got [$];
    s = '1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    en = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      for (int i = 7; i >= 0; i--) begin
        expb[i] = s[6] ^ s[5];
        s = {s[5:0], expb[i]};
      end
      checks++;
      if (byte_o != expb) begin
        failures++;
        $display("FAIL: byte %0d is %02h, expected %02h", k, byte_o, expb);
      end
      got.push_back(byte_o);
      if (k % 10 == 5) begin   // a cycle with en low holds the output
        logic [BYTE_W-1:0] h;
        h = byte_o;
        en = 0;
        @(negedge clk);
        checks++;
        if (byte_o != h) begin failures++; $display("FAIL: output moved with en low"); end
        en = 1;
      end
    end
    for (int k = 0; k + 127 < got.size(); k++) begin
      checks++;
      if (got[k] != got[k + 127]) begin failures++; $display("FAIL: period"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
