// dpl_wrapper_tb -- checks the single-rail to dual-rail encoding (VALID pairs
// while evaluating, NULL0 while precharging) and the output check: an all
// VALID state is released as ciphertext only with done; one NULL pair (of
// either type) withholds it and raises fault.
module dpl_wrapper_tb;
  import dpl_pkg::*;

  logic          eval, done;
  logic [127:0]  pt, key, ct;
  logic [7:0]    rcon;
  dr_t  [127:0]  pt_dr, key_dr, state_dr;
  dr_t  [7:0]    rcon_dr;
  logic          ct_ok, fault;
  int checks = 0, failures = 0;

  dpl_wrapper dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] v;
    int bad;
    for (int n = 0; n < 50; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      rcon = 8'($urandom);
      v = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 128; i++) state_dr[i] = '{t: v[i], f: ~v[i]};
      eval = 1'b0; done = 1'b0; #1;
      check(pt_dr == '0 && key_dr == '0 && rcon_dr == '0, "precharge must give NULL0");
      check(!ct_ok && !fault && ct == '0, "nothing released without done");
      eval = 1'b1; #1;
      for (int i = 0; i < 128; i++) begin
        check(pt_dr[i].t == pt[i] && pt_dr[i].f == ~pt[i], "pt encoding");
        check(key_dr[i].t == key[i] && key_dr[i].f == ~key[i], "key encoding");
      end
      for (int i = 0; i < 8; i++) check(rcon_dr[i].t == rcon[i] && rcon_dr[i].f == ~rcon[i], "rcon encoding");
      done = 1'b1; #1;
      check(ct_ok && !fault && ct == v, "valid state released");
      bad = int'($urandom_range(0, 127));
      state_dr[bad] = (n % 2 == 0) ? DR_NULL0 : DR_NULL1;
      #1;
      check(!ct_ok && fault && ct == '0, $sformatf("NULL at bit %0d must be withheld", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
