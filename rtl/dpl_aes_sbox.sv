// dpl_aes_sbox -- the AES S-box (SubBytes) as a netlist of two-input
// WDDL-without-early-evaluation gates.
//
// The S-box is the multiplicative inverse in GF(2^8) (0 maps to 0) followed
// by the AES affine map. The inverse is computed in the isomorphic composite
// field GF((2^4)^2) = GF(2^4)[Y]/(Y^2 + Y + L), where it needs only GF(2^4)
// operations. For a = a1*Y + a0:
//   D   = L*a1^2 + a1*a0 + a0^2          (in GF(2^4))
//   a^-1 = (a1*D^-1)*Y + (a0 + a1)*D^-1,  with D^-1 = D^14 = D^2 * D^4 * D^8.
// That is five GF(2^4) multiplications; squarings and the constant L are
// linear. The input basis change (AES polynomial basis -> composite) and the
// output basis change merged with the affine matrix are linear maps too; the
// affine constant 8'h63 is a swap of the two rails where its bit is 1, which
// costs no gate and keeps NULL0 a NULL0.
//
// The field constant L and the two basis-change matrices are fixed numbers,
// derived as explained next to their declarations; the GF(2^4) matrices
// (squaring, L*a1^2 + a0^2) are computed at elaboration.
//
// Since no gate evaluates early, a NULL on any input pair reaches all eight
// output pairs. The gate-level decomposition is this design's choice; only
// the logic style is prescribed. Combinational.
module dpl_aes_sbox
  import dpl_pkg::*;
(
  input  dr_t [7:0] x,
  output dr_t [7:0] y
);
  // Field constants (see the header): L = 8, the smallest value making
  // Y^2 + Y + L irreducible over GF(2^4); the isomorphism maps X to
  // R = 8'h20 = 2*Y + 0, the first root of the AES polynomial in the composite
  // field (searching 2..255). IN_MAT row o is bit o of R^i for i = 7..0;
  // OUT_MAT column j is the affine matrix applied to the AES-field element
  // whose composite image is 2^j. Rows are listed from bit 7 down to bit 0.
  localparam logic [3:0]      LAM     = 4'h8;
  localparam logic [7:0][7:0] IN_MAT  = {8'hA0, 8'hAC, 8'hD2, 8'h70, 8'h18, 8'hFC, 8'h04, 8'hA1};
  localparam logic [7:0][7:0] OUT_MAT = {8'h06, 8'hD0, 8'hEE, 8'h3B, 8'h25, 8'h69, 8'h3F, 8'h45};
  localparam logic [7:0]      AFF_C   = 8'h63;

  // D's linear part: {a1, a0} -> L*a1^2 + a0^2.
  function automatic logic [3:0][7:0] dlin_mat();
    logic [3:0][7:0] m;
    logic [3:0] c;
    for (int k = 0; k < 8; k++) begin
      if (k >= 4) c = gf16_mul(LAM, gf16_mul(4'(1 << (k - 4)), 4'(1 << (k - 4))));
      else        c = gf16_mul(4'(1 << k), 4'(1 << k));
      for (int o = 0; o < 4; o++) m[o][k] = c[o];
    end
    return m;
  endfunction

  function automatic logic [3:0][3:0] sq_mat();
    logic [3:0][3:0] m;
    logic [3:0] c;
    for (int k = 0; k < 4; k++) begin
      c = gf16_mul(4'(1 << k), 4'(1 << k));
      for (int o = 0; o < 4; o++) m[o][k] = c[o];
    end
    return m;
  endfunction

  dr_t [7:0] a, b, aff;
  dr_t [3:0] dl, p, d, d2, d4, d8, d6, d14, s;

  dpl_lin_map  #(.NI(8), .NO(8), .MAT(IN_MAT))     u_in   (.x(x), .y(a));
  dpl_lin_map  #(.NI(8), .NO(4), .MAT(dlin_mat())) u_dlin (.x(a), .y(dl));
  dpl_gf16_mul                                     u_m1   (.a(a[7:4]), .b(a[3:0]), .y(p));
  dpl_gate_vec #(.W(4), .FUNC(FN_XOR))             u_d    (.a(dl), .b(p), .y(d));
  dpl_lin_map  #(.NI(4), .NO(4), .MAT(sq_mat()))   u_sq1  (.x(d),  .y(d2));
  dpl_lin_map  #(.NI(4), .NO(4), .MAT(sq_mat()))   u_sq2  (.x(d2), .y(d4));
  dpl_lin_map  #(.NI(4), .NO(4), .MAT(sq_mat()))   u_sq3  (.x(d4), .y(d8));
  dpl_gf16_mul                                     u_m2   (.a(d2), .b(d4), .y(d6));
  dpl_gf16_mul                                     u_m3   (.a(d6), .b(d8), .y(d14));
  dpl_gate_vec #(.W(4), .FUNC(FN_XOR))             u_s    (.a(a[7:4]), .b(a[3:0]), .y(s));
  dpl_gf16_mul                                     u_m4   (.a(a[7:4]), .b(d14), .y(b[7:4]));
  dpl_gf16_mul                                     u_m5   (.a(s),       .b(d14), .y(b[3:0]));
  dpl_lin_map  #(.NI(8), .NO(8), .MAT(OUT_MAT))    u_out  (.x(b), .y(aff));

  for (genvar i = 0; i < 8; i++) begin : g_c
    if (AFF_C[i]) begin : g_inv
      assign y[i] = '{t: aff[i].f, f: aff[i].t};
    end else begin : g_buf
      assign y[i] = aff[i];
    end
  end
endmodule
