// wddl_noee_gate2 -- two-input dual-rail gate of the "WDDL without early
// evaluation" logic style.
//
// The gate is two 4-input LUTs. Each LUT sees all four wires of the two
// dual-rail inputs {a.t, a.f, b.t, b.f}; the upper LUT drives the true rail
// and the lower one the false rail. The output goes VALID only when both
// inputs are VALID, so the evaluation instant never depends on the data (no
// early evaluation), and any NULL input -- a precharge spacer or a fault that
// flipped one wire of a pair -- forces a NULL output. Inconsistent inputs
// (a NULL0 with a NULL1) give a NULL as well. The single-rail function FUNC,
// indexed by {a, b}, may be any two-input function, inverting and
// non-positive ones included.
//
// For FUNC = AND the masks are 16'hFC80 (true) and 16'hFAE0 (false), as in the
// published mask table of this style. The masks for the other functions follow
// the same rules (see dpl_pkg). Combinational, zero-delay in simulation.
module wddl_noee_gate2
  import dpl_pkg::*;
#(
  parameter logic [3:0] FUNC = FN_AND
) (
  input  dr_t a,
  input  dr_t b,
  output dr_t y
);
  localparam logic [15:0] MASK_T = noee_mask_t(FUNC);
  localparam logic [15:0] MASK_F = noee_mask_f(FUNC);

  lut4 #(.MASK(MASK_T)) u_lut_t (.i({a.t, a.f, b.t, b.f}), .o(y.t));
  lut4 #(.MASK(MASK_F)) u_lut_f (.i({a.t, a.f, b.t, b.f}), .o(y.f));
endmodule
