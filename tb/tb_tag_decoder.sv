// tb_tag_decoder: checks the reverse routing tag decoder of one port.
// Covers: the header cycle using the new tag at once (bypass), the tag held
// over the payload bytes, idle headers and a disabled port selecting the
// decoder's own port, and the split of the tag into the three stage selects.
module tb_tag_decoder;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, hdr = 0, en = 1;
  logic [BYTE_W-1:0] byte_i = '0;
  logic [TAG_W-1:0] own = 5'd9, tag_o;
  logic sel2;
  logic [1:0] sel4a, sel4b;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  tag_decoder dut (.clk, .rst, .hdr_i (hdr), .en_i (en), .byte_i, .own_port (own),
                   .tag_o, .sel2, .sel4a, .sel4b);

  task automatic expect_tag(logic [TAG_W-1:0] t, string what);
    checks++;
    if (tag_o !== t || {sel4b, sel4a, sel2} !== t) begin
      failures++;
      $display("FAIL: %s: tag %0d selects %0d, expected %0d", what, tag_o,
               {sel4b, sel4a, sel2}, t);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TAG_W-1:0] t;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    expect_tag(own, "after reset");
    for (int f = 0; f < 40; f++) begin
      t = 5'($urandom);
      en = (f % 7 != 3);
      // header byte: {idle, tag, rsvd}
      @(negedge clk);
      hdr = 1;
      byte_i = {(f % 5 == 2), t, 2'b11};
      #1;
      expect_tag((en && f % 5 != 2) ? t : own, "header cycle");
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        hdr = 0;
        byte_i = 8'($urandom);
        #1;
        expect_tag((en && f % 5 != 2) ? t : own, "payload cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
