// dpl_aes_sbox_tb -- exhaustive test of the dual-rail AES S-box.
// For all 256 input values it checks the VALID output against the behavioural
// reference and known table entries; that an all-NULL0 input gives an
// all-NULL0 output; and that flipping any single wire of any input pair (a
// VALID -> NULL fault) makes all eight output pairs NULL.
module dpl_aes_sbox_tb;
  import dpl_pkg::*;
  import aes_ref_pkg::*;

  dr_t [7:0] x, y;
  int checks = 0, failures = 0;

  dpl_aes_sbox dut (.x(x), .y(y));

  function automatic dr_t [7:0] enc8(logic [7:0] v);
    dr_t [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] got;
    bit allv, alln;
    // Known entries of the AES S-box.
    logic [7:0] kin [4]  = '{8'h00, 8'h01, 8'h53, 8'hFF};
    logic [7:0] kout [4] = '{8'h63, 8'h7C, 8'hED, 8'h16};
    for (int k = 0; k < 4; k++) begin
      x = enc8(kin[k]); #1;
      for (int i = 0; i < 8; i++) got[i] = y[i].t;
      check(got == kout[k], $sformatf("S(%02h)=%02h, expected %02h", kin[k], got, kout[k]));
    end
    for (int v = 0; v < 256; v++) begin
      x = enc8(8'(v)); #1;
      allv = 1;
      for (int i = 0; i < 8; i++) begin
        got[i] = y[i].t;
        allv &= dr_is_valid(y[i]);
      end
      check(allv && got == sbox(8'(v)), $sformatf("S(%02h)=%02h valid=%0d", v, got, allv));
      // single-wire faults
      for (int w = 0; w < 16; w++) begin
        x = enc8(8'(v));
        if (w[0]) x[w/2].t = ~x[w/2].t; else x[w/2].f = ~x[w/2].f;
        #1;
        alln = 1;
        for (int i = 0; i < 8; i++) alln &= !dr_is_valid(y[i]);
        check(alln, $sformatf("single fault on wire %0d of input %02h did not NULL all outputs", w, v));
      end
    end
    x = '0; #1;
    check(y == '0, "NULL0 input must give NULL0 output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
