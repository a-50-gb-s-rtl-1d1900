// tb_mux32_tree: checks the three-stage 32:1 byte multiplexer.
// For random input bytes every one of the 32 select values {sel4b, sel4a,
// sel2} must deliver the byte of that input port.
module tb_mux32_tree;
  import xbar_pkg::*;
  logic [NPORTS-1:0][BYTE_W-1:0] in_lines;
  logic sel2;
  logic [1:0] sel4a, sel4b;
  logic [BYTE_W-1:0] out_line;
  int checks = 0, failures = 0;

  mux32_tree dut (.in_lines, .sel2, .sel4a, .sel4b, .out_line);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int p = 0; p < NPORTS; p++) in_lines[p] = 8'($urandom);
      for (int s = 0; s < NPORTS; s++) begin
        {sel4b, sel4a, sel2} = 5'(s);
        #1;
        checks++;
        if (out_line !== in_lines[s]) begin
          failures++;
          $display("FAIL: select %0d gave %02h, expected %02h", s, out_line, in_lines[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
