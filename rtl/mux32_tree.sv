// mux32_tree: one byte-wide 32-to-1 multiplexer of the switch core.
//
// The 32:1 selection is split into three stages in series, as on the chip:
// sixteen 2:1 multiplexers each choose between two adjacent input ports,
// four 4:1 multiplexers each cover eight ports, and a final 4:1 multiplexer
// covers all 32. With the stage selects sel2, sel4a and sel4b the selected
// input port is {sel4b, sel4a, sel2}. On silicon the last two stages are
// tri-state buses on long wires; here each stage is an ordinary
// combinational multiplexer. Purely combinational, no clock.
module mux32_tree
  import xbar_pkg::*;
(
  input  logic [NPORTS-1:0][BYTE_W-1:0] in_lines,  // one byte per input port
  input  logic                          sel2,      // 2:1 stage select
  input  logic [1:0]                    sel4a,     // first 4:1 stage select
  input  logic [1:0]                    sel4b,     // second 4:1 stage select
  output logic [BYTE_W-1:0]             out_line
);

  logic [15:0][BYTE_W-1:0] stage1;  // after the 2:1 multiplexers
  logic [3:0][BYTE_W-1:0]  stage2;  // after the first 4:1 multiplexers

  always_comb begin
    for (int p = 0; p < 16; p++)
      stage1[p] = sel2 ? in_lines[2*p+1] : in_lines[2*p];
    for (int g = 0; g < 4; g++)
      stage2[g] = stage1[4*g + int'(sel4a)];
    out_line = stage2[sel4b];
  end

endmodule
