// Self-checking test of power_down_ctrl with its default settings (16 idle
// cycles, 4 wake-up cycles, one enable in 4 while powered down). Scripted
// activity: a busy stretch, silence long enough to power down, then traffic
// again. Checked: power down exactly 16 cycles after the last activity, the
// enable pattern 1-in-4 while down, full rate again exactly 4 cycles after
// the activity that wakes it, and no power down while activity keeps coming
// within the threshold.
module tb_power_down_ctrl;
  logic clk = 0, rst_n = 0, activity = 0, low_power, en;
  int checks = 0, failures = 0;

  power_down_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ens;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // activity every 10 cycles: never powers down
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); activity = (i % 10 == 0);
      check(!low_power && en, "full power under periodic activity");
    end
    // one last activity pulse then silence: count cycles to power down
    @(negedge clk); activity = 1;
    @(negedge clk); activity = 0;
    n = 0;
    while (!low_power && n < 100) begin @(negedge clk); n++; end
    check(n == 16, $sformatf("power down after %0d idle cycles", n));
    // enable rate while down
    ens = 0;
    for (int i = 0; i < 40; i++) begin
      if (en) ens++;
      check(low_power, "stays down while idle");
      @(negedge clk);
    end
    check(ens == 10, $sformatf("enable %0d times in 40 cycles", ens));
    // wake up
    activity = 1;
    @(negedge clk); activity = 0;
    n = 0;
    while (low_power && n < 100) begin @(negedge clk); n++; end
    check(n == 4, $sformatf("full rate after %0d wake-up cycles", n));
    check(en, "enable high at full rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
