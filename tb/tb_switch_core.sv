// tb_switch_core: checks the 32 x 32 switch core against a reference model.
// Random frames with random reverse routing tags (so multicast is frequent),
// idle headers and disabled ports are sent at full rate, one frame per nine
// byte clocks. The reference works out, from the inputs alone, what each
// output must carry two byte clocks later (input register plus one cycle
// through the multiplexers to the output register): the frame of the port
// named by its tag, or its own idle frame for an idle header or a disabled
// port, where a disabled input contributes header 0x80 and zero payload.
module tb_switch_core;
  import xbar_pkg::*;
  logic clk = 0, rst = 1, frame_i = 0, frame_o;
  logic [NPORTS-1:0] port_en = '0;
  logic [NPORTS-1:0][BYTE_W-1:0] din = '0, dout;
  logic [NPORTS-1:0][TAG_W-1:0] route;
  int checks = 0, failures = 0, n_multicast = 0, n_idle = 0, n_disabled = 0;

  always #2.5 clk = ~clk;

  switch_core dut (.clk, .rst, .frame_i, .port_en, .din, .dout, .frame_o, .route_o (route));

  // reference pipeline: expected output two cycles after the input
  logic [NPORTS-1:0][BYTE_W-1:0] exp_q [$];
  logic exp_f [$];
  logic [TAG_W-1:0] src [NPORTS];
  logic [NPORTS-1:0] en_frame;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPORTS-1:0][BYTE_W-1:0] eff, expv;
    int cnt [NPORTS];
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 60; f++) begin
      en_frame = (f < 3) ? '1 : NPORTS'({$urandom, $urandom}) | 32'hF0F0_F0F0;
      foreach (cnt[i]) cnt[i] = 0;
      for (int b = 0; b < FRAME_BYTES; b++) begin
        @(negedge clk);
        compare();
        frame_i = (b == 0);
        port_en = en_frame;
        for (int p = 0; p < NPORTS; p++) begin
          if (b == 0) begin
            src[p] = 5'($urandom);
            din[p] = {($urandom % 6 == 0), src[p], 2'($urandom)};
            if (!port_en[p] || din[p][7]) src[p] = 5'(p);
            if (!port_en[p]) n_disabled++;
            else if (din[p][7]) n_idle++;
            cnt[src[p]]++;
          end else din[p] = 8'($urandom);
          eff[p] = port_en[p] ? din[p] : (b == 0 ? 8'h80 : 8'h00);
        end
        for (int p = 0; p < NPORTS; p++) expv[p] = eff[src[p]];
        exp_q.push_back(expv);
        exp_f.push_back(b == 0);
        if (b == 0) foreach (cnt[i]) if (cnt[i] > 1) n_multicast++;
      end
    end
    @(negedge clk);
    compare();
    frame_i = 0;
    exp_q.push_back(exp_q[$]);  // flush: compare the last two inputs
    exp_f.push_back(1'b0);
    @(negedge clk);
    compare();
    checks++;
    if (exp_q.size() != 1) begin failures++; $display("FAIL: outputs left unchecked"); end
    check_mech(n_multicast, "multicast");
    check_mech(n_idle, "idle headers");
    check_mech(n_disabled, "disabled ports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mech(int n, string what);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: no %s", what); end
  endtask

  // called at each falling edge before new inputs are applied: the output
  // register must now hold what was applied two falling edges ago
  task automatic compare();
    logic [NPORTS-1:0][BYTE_W-1:0] e;
    logic ef;
    if (exp_q.size() < 2) return;
    e  = exp_q.pop_front();
    ef = exp_f.pop_front();
    checks++;
    if (dout !== e || frame_o !== ef) begin
      failures++;
      if (failures < 5) $display("FAIL at %0t: dout differs (frame_o %b expected %b)", $time, frame_o, ef);
    end
  endtask
endmodule
