// aes_controller_tb -- follows the controller through two encryptions and
// compares every cycle with the expected schedule: cycle c after start
// belongs to step c/2, odd cycles evaluate and capture, step 0 loads, step 10
// is the last round, rcon of step s is 02^(s-1) in GF(2^8), and done pulses
// 22 cycles after start. Also checks that start is ignored while busy.
module aes_controller_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, eval, cap, load, last;
  logic [7:0] rcon;
  int checks = 0, failures = 0;

  aes_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !eval, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int c = 0; c < 22; c++) begin
        step = c / 2;
        if (c == 5) start = 1'b1;       // must be ignored
        if (c == 6) start = 1'b0;
        check(busy && !done, $sformatf("busy at cycle %0d", c));
        check(eval == (c % 2 == 1), $sformatf("eval at cycle %0d", c));
        check(cap == (c % 2 == 1), $sformatf("cap at cycle %0d", c));
        check(load == (step == 0), $sformatf("load at cycle %0d", c));
        check(last == (step == 10), $sformatf("last at cycle %0d", c));
        if (step > 0) check(rcon == aes_ref_pkg::rcon(step), $sformatf("rcon %h at step %0d", rcon, step));
        @(negedge clk);
      end
      check(done && !busy && !eval, "done 22 cycles after start");
      @(negedge clk);
      check(!done && !busy, "idle after done");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
