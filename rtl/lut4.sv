// lut4 -- four-input look-up table, the logic element of the target FPGA
// family. The output is bit i of the 16-bit configuration mask MASK, with i[3]
// the most significant address bit. Purely combinational.
//
// Each WDDL-without-early-evaluation gate is one pair of these LUTs, one per
// rail, configured with the masks computed in dpl_pkg.
module lut4 #(
  parameter logic [15:0] MASK = 16'h0000
) (
  input  logic [3:0] i,
  output logic       o
);
  assign o = MASK[i];
endmodule
