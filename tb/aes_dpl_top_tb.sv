// aes_dpl_top_tb -- end-to-end test of the dual-rail AES coprocessor at its
// default (and only) size.
//
// 1. Known-answer tests (two FIPS-197 vectors) and random key/plaintext pairs
//    against the behavioural reference; checks the 22-cycle latency and that
//    every precharge phase drives the state input of the round logic to NULL0.
// 2. Fault injection into the dual-rail state register during a precharge
//    phase of a random round:
//      - one wire of one pair flipped (VALID -> NULL): the NULL must spread
//        and the coprocessor must report fault and withhold the ciphertext;
//      - both wires of one pair flipped (VALID -> wrong VALID, the coherent
//        fault): the result stays VALID but wrong, the one case the logic
//        style cannot stop;
//      - a coherent pair fault together with a one-wire fault elsewhere: the
//        NULL must absorb the wrong VALID (fault reported).
// Every mechanism is counted, and one that never happened counts a failure.
module aes_dpl_top_tb;
  import dpl_pkg::*;
  import aes_ref_pkg::*;

  localparam int LATENCY = 22;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] key = '0, pt = '0, ct;
  logic         busy, done, ct_ok, fault;
  int checks = 0, failures = 0;
  int n_pre = 0, n_eval = 0, n_load = 0, n_last = 0, n_null_pre = 0;
  int n_null_absorbed = 0, n_valid_star = 0, n_mixed_absorbed = 0, n_ok = 0;

  aes_dpl_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // mechanism monitors
  always @(posedge clk) if (rst_n && busy) begin
    if (!dut.eval) begin
      n_pre++;
      if (dut.u_dp.s_g == '0 && dut.u_dp.k_g == '0 && dut.pt_dr == '0) n_null_pre++;
    end else begin
      n_eval++;
      if (dut.load) n_load++;
      if (dut.last) n_last++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one encryption; fault_kind 0: none, 1: one wire, 2: coherent pair,
  // cycles counts the clock edges from the one that samples start to the one
  // that raises done.
  // 3: coherent pair + one wire elsewhere. Returns the cycle count.
  task automatic run(input logic [127:0] k, input logic [127:0] p, input int fault_kind,
                     output int cycles, output logic [127:0] res, output logic ok, output logic flt);
    int fround, fbit, fbit2;
    int pre_seen;
    key = k; pt = p;
    fround = 1 + int'($urandom_range(0, 9));   // precharge phase before step fround
    fbit   = int'($urandom_range(0, 127));
    fbit2  = (fbit + 1 + int'($urandom_range(0, 126))) % 128;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 0; pre_seen = 0;
    while (!done) begin
      if (fault_kind != 0 && busy && !dut.eval) begin
        if (pre_seen == fround) begin
          if (fault_kind == 1 || fault_kind == 3) dut.u_dp.s_q[fbit].t = ~dut.u_dp.s_q[fbit].t;
          if (fault_kind == 2 || fault_kind == 3) begin
            int b;
            b = (fault_kind == 3) ? fbit2 : fbit;
            dut.u_dp.s_q[b] = '{t: ~dut.u_dp.s_q[b].t, f: ~dut.u_dp.s_q[b].f};
          end
        end
        pre_seen++;
      end
      @(negedge clk);
      cycles++;
    end
    res = ct; ok = ct_ok; flt = fault;
  endtask

  initial begin
    int cyc;
    logic [127:0] res, k, p, exp;
    logic ok, flt;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // FIPS-197 known answers
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0, cyc, res, ok, flt);
    check(ok && !flt && res == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("KAT1 got %h", res));
    check(cyc == LATENCY, $sformatf("latency %0d, expected %0d", cyc, LATENCY));
    if (ok) n_ok++;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 0, cyc, res, ok, flt);
    check(ok && !flt && res == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("KAT2 got %h", res));
    if (ok) n_ok++;

    for (int n = 0; n < 20; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      exp = encrypt(p, k);
      run(k, p, 0, cyc, res, ok, flt);
      check(ok && !flt && res == exp, $sformatf("random %0d: got %h exp %h", n, res, exp));
      check(cyc == LATENCY, $sformatf("latency %0d", cyc));
      if (ok) n_ok++;
    end

    for (int n = 0; n < 30; n++) begin
      int kind;
      kind = 1 + (n % 3);
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      exp = encrypt(p, k);
      run(k, p, kind, cyc, res, ok, flt);
      case (kind)
        1: begin
          check(flt && !ok && res == '0, "one-wire fault must end as NULL and be withheld");
          if (flt) n_null_absorbed++;
        end
        2: begin
          check(ok && !flt && res != exp, "coherent pair fault should give a wrong VALID result");
          if (ok && res != exp) n_valid_star++;
        end
        default: begin
          check(flt && !ok && res == '0, "NULL must absorb the coherent pair fault");
          if (flt) n_mixed_absorbed++;
        end
      endcase
    end

    // every mechanism must have happened
    check(n_pre > 0 && n_pre == n_null_pre, $sformatf("precharge phases %0d, all-NULL0 %0d", n_pre, n_null_pre));
    check(n_eval > 0, "evaluation phases");
    check(n_load > 0, "initial key addition");
    check(n_last > 0, "final round without MixColumns");
    check(n_ok > 0, "fault-free ciphertext released");
    check(n_null_absorbed > 0, "one-wire fault turned into NULL output");
    check(n_valid_star > 0, "coherent pair fault propagated");
    check(n_mixed_absorbed > 0, "NULL absorbed a coherent pair fault");
    $display("precharge=%0d eval=%0d load=%0d last=%0d ok=%0d null_absorbed=%0d valid_star=%0d mixed_absorbed=%0d",
             n_pre, n_eval, n_load, n_last, n_ok, n_null_absorbed, n_valid_star, n_mixed_absorbed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
