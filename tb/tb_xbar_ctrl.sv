// tb_xbar_ctrl: checks the crossbar controller: the 0..8 frame position
// count and header strobe, link ready flags taking effect only at frame
// boundaries, the enabled-port count, and recalibration disabling every
// port at the next frame boundary with one link clear pulse.
module tb_xbar_ctrl;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, recal = 0;
  logic [NPORTS-1:0] ready = '0, port_en;
  logic [BPOS_W-1:0] pos;
  logic frame, link_clr;
  logic [5:0] n_en;
  int checks = 0, failures = 0, n_clr = 0;

  always #2.5 clk = ~clk;

  xbar_ctrl dut (.clk, .rst, .recal_i (recal), .link_ready_i (ready), .pos_o (pos),
                 .frame_o (frame), .port_en_o (port_en), .link_clr_o (link_clr),
                 .n_enabled_o (n_en));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && link_clr) n_clr++;

  initial begin
    logic [NPORTS-1:0] en_exp;
    logic [BPOS_W-1:0] p0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    en_exp = '0;
    for (int c = 0; c < 400; c++) begin
      p0 = pos;
      chk(frame == (pos == 0), "header strobe at position 0");
      chk(port_en == en_exp, $sformatf("cycle %0d: enables %h, expected %h", c, port_en, en_exp));
      chk(int'(n_en) == $countones(port_en), "enabled port count");
      if ($urandom % 3 == 0) ready = {$urandom, $urandom};
      recal = (c == 200);
      @(negedge clk);
      chk(pos == ((p0 == 8) ? 0 : p0 + 1), "position counts 0..8");
      if (p0 == 8) en_exp = (c >= 200 && c < 209) ? '0 : ready;
    end
    // one pulse from the end of reset, one from the recalibration
    chk(n_clr == 2, $sformatf("link clear pulses: %0d, expected 2", n_clr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
