// dpl_sbox_fault_tb -- fault-multiplicity experiment on the 16 input wires
// (8 dual-rail pairs) of one dual-rail AES S-box.
//
// For several input bytes it applies every one of the 2^16 wire-flip
// patterns and classifies the output: all NULL (fault annihilated), all VALID
// and wrong (an undetected "VALID*" fault), anything else. A pattern yields a
// VALID input only if it flips both wires of every pair it touches; for m
// flips that happens for C(8, m/2) of the C(16, m) patterns (none for odd m),
// so the rate of undetected faults must be exactly C(8,m/2)/C(16,m):
// 6.67 % for m = 2, 1.54 % for m = 4, 0.70 % for m = 6. Every other pattern
// must turn all eight outputs NULL (no early evaluation, full propagation).
module dpl_sbox_fault_tb;
  import dpl_pkg::*;
  import aes_ref_pkg::*;

  localparam int NVAL = 3;

  dr_t [7:0] x, y;
  int checks = 0, failures = 0;
  int n_pat  [17];
  int n_star [17];
  int n_null [17];

  dpl_aes_sbox dut (.x(x), .y(y));

  function automatic longint binom(int n, int k);
    longint r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] vals [NVAL] = '{8'h00, 8'h53, 8'hC3};
    logic [7:0] got;
    logic [15:0] wires;
    bit allv, alln;
    int m;
    for (int k = 0; k <= 16; k++) begin n_pat[k] = 0; n_star[k] = 0; n_null[k] = 0; end
    for (int v = 0; v < NVAL; v++) begin
      for (int i = 0; i < 8; i++) begin
        wires[2*i+1] = vals[v][i];
        wires[2*i]   = ~vals[v][i];
      end
      for (int mask = 0; mask < 65536; mask++) begin
        logic [15:0] fw;
        fw = wires ^ 16'(mask);
        for (int i = 0; i < 8; i++) x[i] = '{t: fw[2*i+1], f: fw[2*i]};
        #1;
        m = $countones(16'(mask));
        allv = 1; alln = 1;
        for (int i = 0; i < 8; i++) begin
          got[i] = y[i].t;
          allv &= dr_is_valid(y[i]);
          alln &= !dr_is_valid(y[i]);
        end
        n_pat[m]++;
        if (allv && (m == 0 ? got == sbox(vals[v]) : got != sbox(vals[v]))) n_star[m] += (m == 0) ? 0 : 1;
        if (alln) n_null[m]++;
        if (m == 0) begin
          checks++;
          if (!(allv && got == sbox(vals[v]))) failures++;
        end
      end
    end
    for (int k = 1; k <= 16; k++) begin
      longint exp_star;
      exp_star = (k % 2 == 0) ? NVAL * binom(8, k / 2) : 0;
      checks += 2;
      if (longint'(n_star[k]) != exp_star) begin
        failures++;
        $display("FAIL m=%0d: %0d undetected, expected %0d", k, n_star[k], exp_star);
      end
      if (longint'(n_null[k] + n_star[k]) != longint'(n_pat[k])) begin
        failures++;
        $display("FAIL m=%0d: %0d patterns neither all-NULL nor VALID*", k, n_pat[k] - n_null[k] - n_star[k]);
      end
      if (k <= 8)
        $display("m=%0d patterns=%0d undetected=%0d (%0.2f %%)", k, n_pat[k], n_star[k],
                 100.0 * n_star[k] / n_pat[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
