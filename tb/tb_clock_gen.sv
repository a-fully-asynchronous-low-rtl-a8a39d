// Self-checking test of the clock_gen model: measures the period for the
// codes at both ends of the range (1000 ps = 1 GHz, 2500 ps = 400 MHz), a
// middle code and each scaling factor, against (1000 + 100*code) * 2^scale.
module tb_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;
  logic rst_n = 0, clk_out;
  logic [3:0] code = '0;
  logic [1:0] scale = '0;
  int checks = 0, failures = 0;

  clock_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic [3:0] c, input logic [1:0] s);
    longint t0, t1, expect_ps;
    code = c; scale = s;
    repeat (3) @(posedge clk_out);   // let the new setting take effect
    t0 = longint'($time);
    @(posedge clk_out);
    t1 = longint'($time);
    expect_ps = longint'(1000 + 100 * int'(c)) << s;
    check(t1 - t0 == expect_ps, $sformatf("code %0d scale %0d: period %0d expected %0d", c, s, t1 - t0, expect_ps));
  endtask

  initial begin
    begin
      longint t0, t1;
      @(posedge clk_out); t0 = longint'($time);
      @(posedge clk_out); t1 = longint'($time);
      check(t1 - t0 == 2500, "runs at 2.5 ns in reset");
    end
    rst_n = 1;
    measure(4'd0, 2'd0);
    measure(4'd15, 2'd0);
    measure(4'd7, 2'd0);
    for (int s = 1; s < 4; s++) measure(4'd5, 2'(s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
