// aes_fault_multiplicity_tb -- fault-multiplicity experiment on the whole
// coprocessor. For each multiplicity m = 1..8 it runs encryptions in which m
// distinct wires among the 16 wires (8 pairs) of one random state byte are
// flipped during the precharge cycle before a random round. The outcome must
// be:
//   * result withheld (fault = 1, ct = 0) unless every flipped wire is paired
//     with the other wire of its pair -- always the case for odd m;
//   * a VALID but wrong ciphertext when all flips are paired (coherent).
// It also forces at least one all-paired pattern for every even m, so that
// case is exercised, and prints the observed rate of undetected faults per
// m next to the model C(8,m/2)/C(16,m).
module aes_fault_multiplicity_tb;
  import dpl_pkg::*;
  import aes_ref_pkg::*;

  localparam int TRIALS = 24;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] key = '0, pt = '0, ct;
  logic         busy, done, ct_ok, fault;
  int checks = 0, failures = 0;

  aes_dpl_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random set of m distinct wires out of 16; paired = 1 forces m/2 whole pairs.
  function automatic logic [15:0] pick(int m, bit paired);
    logic [15:0] w;
    int k;
    w = '0;
    if (paired) begin
      while ($countones(w) < m) begin
        k = int'($urandom_range(0, 7));
        w[2*k +: 2] = 2'b11;
      end
    end else begin
      while ($countones(w) < m) w[$urandom_range(0, 15)] = 1'b1;
    end
    return w;
  endfunction

  function automatic bit all_paired(logic [15:0] w);
    for (int k = 0; k < 8; k++) if (w[2*k] != w[2*k+1]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    logic [127:0] exp;
    logic [15:0]  w;
    int byte_i, fround, pre_seen, n_star;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int m = 1; m <= 8; m++) begin
      n_star = 0;
      for (int trial = 0; trial < TRIALS; trial++) begin
        key = {$urandom, $urandom, $urandom, $urandom};
        pt  = {$urandom, $urandom, $urandom, $urandom};
        exp = encrypt(pt, key);
        w = pick(m, (m % 2 == 0) && (trial == 0));
        byte_i = int'($urandom_range(0, 15));
        fround = 1 + int'($urandom_range(0, 9));
        @(negedge clk); start = 1'b1;
        @(negedge clk); start = 1'b0;
        pre_seen = 0;
        while (!done) begin
          if (busy && !dut.eval) begin
            if (pre_seen == fround)
              for (int k = 0; k < 8; k++) begin
                if (w[2*k+1]) dut.u_dp.s_q[8*byte_i + k].t = ~dut.u_dp.s_q[8*byte_i + k].t;
                if (w[2*k])   dut.u_dp.s_q[8*byte_i + k].f = ~dut.u_dp.s_q[8*byte_i + k].f;
              end
            pre_seen++;
          end
          @(negedge clk);
        end
        if (all_paired(w)) begin
          check(ct_ok && !fault && ct != exp, $sformatf("m=%0d paired: wrong VALID expected", m));
          n_star++;
        end else begin
          check(fault && !ct_ok && ct == '0, $sformatf("m=%0d unpaired: must be withheld", m));
        end
      end
      $display("m=%0d trials=%0d undetected=%0d (model %0.2f %%)", m, TRIALS, n_star,
               (m % 2 == 0) ? 100.0 * binom(8, m / 2) / binom(16, m) : 0.0);
      if (m % 2 == 0) check(n_star > 0, $sformatf("m=%0d: coherent case never exercised", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
