// dpl_xor_reduce -- XOR of the inputs x[k] selected by the constant mask SEL,
// built as a chain of two-input WDDL-without-early-evaluation XOR gates. Used
// for the fixed linear maps of the design (GF(2^8) reduction, squaring, the
// S-box affine map). One selected input is passed straight through; SEL must
// select at least one input (an empty XOR would be a constant, which a
// precharged netlist cannot hold). Combinational.
module dpl_xor_reduce
  import dpl_pkg::*;
#(
  parameter int             N   = 8,
  parameter logic [N-1:0]   SEL = '1
) (
  input  dr_t [N-1:0] x,
  output dr_t         y
);
  // Index of the lowest selected input.
  function automatic int first_sel();
    for (int k = 0; k < N; k++) if (SEL[k]) return k;
    return N;
  endfunction
  localparam int FIRST = first_sel();

  if (FIRST >= N) begin : g_empty
    $error("dpl_xor_reduce: SEL selects no input");
  end

  dr_t acc [N];
  for (genvar k = 0; k < N; k++) begin : g_chain
    if (k < FIRST) begin : g_none
      assign acc[k] = DR_NULL0;
    end else if (k == FIRST) begin : g_first
      assign acc[k] = x[k];
    end else if (SEL[k]) begin : g_xor
      wddl_noee_gate2 #(.FUNC(FN_XOR)) u_xor (.a(acc[k-1]), .b(x[k]), .y(acc[k]));
    end else begin : g_pass
      assign acc[k] = acc[k-1];
    end
  end
  assign y = acc[N-1];
endmodule
