// dpl_aes_datapath_tb -- drives the dual-rail AES datapath with its own
// precharge/evaluate schedule (the controller is not used) and checks, after
// every capture, that the state register holds the reference state after
// that round, all pairs VALID. During every precharge cycle the round logic
// output must be entirely NULL0. Runs the FIPS-197 vector and random ones.
module dpl_aes_datapath_tb;
  import dpl_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic eval = 1'b0, load = 1'b0, last = 1'b0, cap = 1'b0;
  dr_t [7:0]   rcon;
  dr_t [127:0] pt, key, state;
  int checks = 0, failures = 0;

  dpl_aes_datapath dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic dr_t [127:0] enc128(logic [127:0] v);
    dr_t [127:0] r;
    for (int i = 0; i < 128; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  function automatic dr_t [7:0] enc8(logic [7:0] v);
    dr_t [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt_and_check(logic [127:0] k, logic [127:0] p);
    logic [127:0] got, exp;
    logic allv;
    for (int s = 0; s <= 10; s++) begin
      // precharge cycle
      eval = 1'b0; cap = 1'b0; load = (s == 0); last = (s == 10);
      pt = '0; key = '0; rcon = '0;
      #1;
      check(dut.s_d == '0 && dut.k_d == '0, $sformatf("round logic not NULL0 in precharge, step %0d", s));
      @(negedge clk);
      // evaluation cycle
      eval = 1'b1; cap = 1'b1;
      pt = enc128(p); key = enc128(k);
      rcon = (s == 0) ? '0 : enc8(aes_ref_pkg::rcon(s));
      @(negedge clk);
      exp = state_after(p, k, s);
      allv = 1'b1;
      for (int i = 0; i < 128; i++) begin
        got[i] = state[i].t;
        allv &= dr_is_valid(state[i]);
      end
      check(allv && got == exp, $sformatf("step %0d: got %h exp %h", s, got, exp));
    end
  endtask

  initial begin
    pt = '0; key = '0; rcon = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == '0, "reset state is NULL0");
    encrypt_and_check(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    for (int n = 0; n < 5; n++)
      encrypt_and_check({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
