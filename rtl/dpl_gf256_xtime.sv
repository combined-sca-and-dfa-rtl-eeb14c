// dpl_gf256_xtime -- dual-rail multiplication by X (the constant 02) in
// GF(2^8) with the AES polynomial: a left shift whose carry is folded back
// into bits 0, 1, 3 and 4. Three WDDL-without-early-evaluation XOR gates; the
// other bits are wires. Combinational.
module dpl_gf256_xtime
  import dpl_pkg::*;
(
  input  dr_t [7:0] a,
  output dr_t [7:0] y
);
  assign y[0] = a[7];
  wddl_noee_gate2 #(.FUNC(FN_XOR)) u_x1 (.a(a[0]), .b(a[7]), .y(y[1]));
  assign y[2] = a[1];
  wddl_noee_gate2 #(.FUNC(FN_XOR)) u_x3 (.a(a[2]), .b(a[7]), .y(y[3]));
  wddl_noee_gate2 #(.FUNC(FN_XOR)) u_x4 (.a(a[3]), .b(a[7]), .y(y[4]));
  assign y[5] = a[4];
  assign y[6] = a[5];
  assign y[7] = a[6];
endmodule
