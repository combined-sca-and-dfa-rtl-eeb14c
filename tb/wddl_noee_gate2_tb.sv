// wddl_noee_gate2_tb -- exhaustive test of the dual-rail gate.
//  * AND: all 16 input rows against the published truth table of the true and
//    false rails (masks FC80 / FAE0).
//  * OR, XOR, NAND, XNOR: all 16 rows against an independent formulation of
//    the rules: VALID f(a,b) when both inputs are VALID; otherwise NULL0 if at
//    most one wire is high, NULL1 if three or more are, and the NULL type of
//    a.t when exactly two wires are high without both pairs being VALID.
//  * The two fault cases where a plain (early-evaluating) WDDL AND stops a
//    NULL or turns two NULLs into a false VALID: this gate must output NULL.
module wddl_noee_gate2_tb;
  import dpl_pkg::*;

  dr_t a, b, y_and, y_or, y_xor, y_nand, y_xnor;
  int checks = 0, failures = 0;

  wddl_noee_gate2 #(.FUNC(FN_AND))  u_and  (.a, .b, .y(y_and));
  wddl_noee_gate2 #(.FUNC(FN_OR))   u_or   (.a, .b, .y(y_or));
  wddl_noee_gate2 #(.FUNC(FN_XOR))  u_xor  (.a, .b, .y(y_xor));
  wddl_noee_gate2 #(.FUNC(FN_NAND)) u_nand (.a, .b, .y(y_nand));
  wddl_noee_gate2 #(.FUNC(FN_XNOR)) u_xnor (.a, .b, .y(y_xnor));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic dr_t model(int fn, logic [3:0] w);
    logic va, vb, av, bv, yv;
    int ones;
    va = w[3] ^ w[2];
    vb = w[1] ^ w[0];
    av = w[3];
    bv = w[1];
    if (va && vb) begin
      case (fn)
        0: yv = av | bv;
        1: yv = av ^ bv;
        2: yv = ~(av & bv);
        default: yv = ~(av ^ bv);
      endcase
      return '{t: yv, f: ~yv};
    end
    ones = int'(w[0]) + int'(w[1]) + int'(w[2]) + int'(w[3]);
    if (ones < 2) return DR_NULL0;
    if (ones > 2) return DR_NULL1;
    return w[3] ? DR_NULL1 : DR_NULL0;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Rows a.t a.f b.t b.f = 0000 .. 1111
    logic [15:0] tab_t = 16'b1111_1100_1000_0000;
    logic [15:0] tab_f = 16'b1111_1010_1110_0000;
    logic [3:0] w;
    dr_t ee;
    for (int r = 0; r < 16; r++) begin
      w = 4'(r);
      {a.t, a.f, b.t, b.f} = w;
      #1;
      check(y_and == '{t: tab_t[r], f: tab_f[r]}, $sformatf("AND row %b: %b%b", w, y_and.t, y_and.f));
      check(y_or   == model(0, w), $sformatf("OR row %b", w));
      check(y_xor  == model(1, w), $sformatf("XOR row %b", w));
      check(y_nand == model(2, w), $sformatf("NAND row %b", w));
      check(y_xnor == model(3, w), $sformatf("XNOR row %b", w));
    end
    // Case (a): a = VALID0 = (0,1), fault a.f 1->0 gives NULL0; b = VALID0.
    a = '{t: 1'b0, f: 1'b0}; b = '{t: 1'b0, f: 1'b1}; #1;
    ee = '{t: a.t & b.t, f: a.f | b.f};   // early-evaluating WDDL AND
    check(dr_is_valid(ee), "reference: WDDL AND with early evaluation stops the NULL");
    check(!dr_is_valid(y_and), "gate must pass the NULL on");
    // Case (b): a = VALID1, fault a.f 0->1; b = VALID1, fault b.t 1->0.
    a = '{t: 1'b1, f: 1'b1}; b = '{t: 1'b0, f: 1'b0}; #1;
    ee = '{t: a.t & b.t, f: a.f | b.f};
    check(dr_is_valid(ee), "reference: WDDL AND turns two NULLs into a VALID");
    check(!dr_is_valid(y_and), "gate must not create a VALID from two NULLs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
