// tb_byte_clock_gen: checks the clock select and the divide-by-4 byte clock.
// The byte clock must have exactly four tree clock periods (200 MHz from
// 800 MHz), rise when phase wraps to 0, and follow the scan clock when
// scan_mode is set.
module tb_byte_clock_gen;
  logic vco = 0, scan = 0, scan_mode = 0;
  logic tree_clk, byteclk;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  realtime t_last, t_now;

  always #0.625 vco = ~vco;    // 800 MHz
  always #3 scan = ~scan;      // slow scan clock

  byte_clock_gen dut (.vco_clk (vco), .scan_clk (scan), .scan_mode, .tree_clk,
                      .byteclk, .phase);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge byteclk);
    t_last = $realtime;
    for (int i = 0; i < 20; i++) begin
      @(posedge byteclk);
      t_now = $realtime;
      chk(t_now - t_last > 4.99 && t_now - t_last < 5.01, "byte clock period is 5 ns");
      #0.1;
      chk(phase == 2'd0, "byte clock rises at phase 0");
      t_last = t_now;
    end
    // phase counts one per tree clock
    for (int i = 0; i < 8; i++) begin
      logic [1:0] p0;
      p0 = phase;
      @(posedge tree_clk);
      #0.1;
      chk(phase == p0 + 2'd1, "phase steps by one");
    end
    scan_mode = 1;
    #0.1;
    for (int i = 0; i < 6; i++) begin
      #0.7;
      chk(tree_clk == scan, "scan clock selected");
    end
    @(posedge byteclk);
    t_last = $realtime;
    @(posedge byteclk);
    chk($realtime - t_last > 23.9 && $realtime - t_last < 24.1, "byte clock from scan clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
