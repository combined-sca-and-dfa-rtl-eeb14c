// dpl_lin_map -- fixed GF(2)-linear map y = MAT * x on dual-rail vectors.
// Output bit o is the XOR of the inputs selected by row MAT[o], built as a
// chain of WDDL-without-early-evaluation XOR gates (dpl_xor_reduce). Every row
// must select at least one input. Used for the basis changes, squarings and
// constant multiplications of the composite-field S-box. Combinational.
module dpl_lin_map
  import dpl_pkg::*;
#(
  parameter int                        NI  = 8,
  parameter int                        NO  = 8,
  parameter logic [NO-1:0][NI-1:0]     MAT = '1
) (
  input  dr_t [NI-1:0] x,
  output dr_t [NO-1:0] y
);
  for (genvar o = 0; o < NO; o++) begin : g_row
    dpl_xor_reduce #(.N(NI), .SEL(MAT[o])) u_red (.x(x), .y(y[o]));
  end
endmodule
