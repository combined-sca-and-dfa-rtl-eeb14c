// lut4_tb -- checks that the LUT output is MASK[i] for every address, for the
// two masks of the dual-rail AND gate and a walking-one mask.
module lut4_tb;
  logic [3:0] i;
  logic o_t, o_f, o_w;
  int checks = 0, failures = 0;

  lut4 #(.MASK(16'hFC80)) u_t (.i(i), .o(o_t));
  lut4 #(.MASK(16'hFAE0)) u_f (.i(i), .o(o_f));
  lut4 #(.MASK(16'h0020)) u_w (.i(i), .o(o_w));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_t, exp_f;
    exp_t = 16'b1111_1100_1000_0000;
    exp_f = 16'b1111_1010_1110_0000;
    for (int a = 0; a < 16; a++) begin
      i = 4'(a); #1;
      checks += 3;
      if (o_t != exp_t[a]) begin failures++; $display("FAIL FC80[%0d]", a); end
      if (o_f != exp_f[a]) begin failures++; $display("FAIL FAE0[%0d]", a); end
      if (o_w != (a == 5)) begin failures++; $display("FAIL 0020[%0d]", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
