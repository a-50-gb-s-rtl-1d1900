// tb_prbs7_check: checks the self-synchronising PRBS-7 verifier.
// A clean PRBS-7 stream from a bit-serial reference, started at an arbitrary
// state, must give no errors; each single flipped bit must add exactly three
// errors; the byte count must follow the enabled cycles.
module tb_prbs7_check;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [BYTE_W-1:0] byte_i = '0;
  logic [15:0] err_cnt, bytes;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  prbs7_check #(.CNT_W(16)) dut (.clk, .rst, .en, .byte_i, .err_cnt_o (err_cnt), .bytes_o (bytes));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [6:0] s;
    logic [BYTE_W-1:0] b;
    int nerr;
    s = 7'h2b;
    nerr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    en = 1;
    for (int k = 0; k < 400; k++) begin
      for (int i = 7; i >= 0; i--) begin
        b[i] = s[6] ^ s[5];
        s = {s[5:0], b[i]};
      end
      if (k % 50 == 25) begin
        b[k % 8] = ~b[k % 8];
        nerr += 3;
      end
      byte_i = b;
      @(negedge clk);
      if (k % 50 == 10) chk(int'(err_cnt) == nerr, $sformatf("errors %0d, expected %0d", err_cnt, nerr));
    end
    en = 0;
    @(negedge clk);
    chk(int'(err_cnt) == nerr, $sformatf("final errors %0d, expected %0d", err_cnt, nerr));
    chk(nerr > 0, "errors injected");
    chk(bytes >= 16'd400 && bytes <= 16'd402, $sformatf("byte count %0d", bytes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
