// dpl_gate_vec -- W independent two-input WDDL-without-early-evaluation gates
// of the same function FUNC, applied bit by bit to two dual-rail vectors:
// y[i] = FUNC(a[i], b[i]). A convenience wrapper around wddl_noee_gate2 for the
// wide parallel layers of the datapath (AddRoundKey, MixColumns, partial
// products). Combinational.
module dpl_gate_vec
  import dpl_pkg::*;
#(
  parameter int         W    = 8,
  parameter logic [3:0] FUNC = FN_XOR
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  output dr_t [W-1:0] y
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    wddl_noee_gate2 #(.FUNC(FUNC)) u_gate (.a(a[i]), .b(b[i]), .y(y[i]));
  end
endmodule
