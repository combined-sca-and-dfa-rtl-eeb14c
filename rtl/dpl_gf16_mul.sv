// dpl_gf16_mul -- dual-rail multiplier in GF(2^4) with the polynomial
// X^4 + X + 1. 16 WDDL-without-early-evaluation AND gates form the partial
// products a[i]&b[j]; each output bit is the XOR of the partial products
// whose reduced power X^(i+j) has that bit set. Combinational.
module dpl_gf16_mul
  import dpl_pkg::*;
(
  input  dr_t [3:0] a,
  input  dr_t [3:0] b,
  output dr_t [3:0] y
);
  dr_t [15:0] aa, bb, pp;
  for (genvar i = 0; i < 4; i++) begin : g_i
    for (genvar j = 0; j < 4; j++) begin : g_j
      assign aa[i*4+j] = a[i];
      assign bb[i*4+j] = b[j];
    end
  end
  dpl_gate_vec #(.W(16), .FUNC(FN_AND)) u_pp (.a(aa), .b(bb), .y(pp));

  function automatic logic [3:0][15:0] red_mat();
    logic [3:0][15:0] m;
    logic [3:0] pw;
    m = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        pw = gf16_xpow(i + j);
        for (int o = 0; o < 4; o++) m[o][i*4+j] = pw[o];
      end
    return m;
  endfunction

  dpl_lin_map #(.NI(16), .NO(4), .MAT(red_mat())) u_red (.x(pp), .y(y));
endmodule
