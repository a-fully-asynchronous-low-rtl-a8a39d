// Self-checking test of delay_line_prog: after reset the slowest code is
// active; a write becomes the active setting at the second edge after the
// write edge (inside the three-cycle programming bound) and busy is high for
// exactly the cycle in between; random writes are checked against that rule.
module tb_delay_line_prog;
  logic clk = 0, rst_n = 0, cfg_we = 0, busy;
  logic [3:0] cfg_code = '0, code;
  logic [1:0] cfg_scale = '0, scale;
  int checks = 0, failures = 0;

  delay_line_prog dut (.*);
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
    logic [5:0] exp_active, pend_val;
    bit pend1, pend2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(code == 4'hF && scale == 2'd0, "reset setting");
    exp_active = {2'd0, 4'hF};
    pend1 = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      cfg_we = ($urandom % 3 == 0);
      cfg_code = 4'($urandom); cfg_scale = 2'($urandom);
      @(posedge clk); #1;
      // effect of the edge just passed
      if (pend1) exp_active = pend_val;
      if (cfg_we) pend_val = {cfg_scale, cfg_code};
      pend1 = cfg_we;
      check({scale, code} == exp_active, $sformatf("active setting at step %0d", i));
      check(busy == pend1, "busy while an update is pending");
    end
    // one write in isolation: active at the second edge
    @(negedge clk); cfg_we = 1; cfg_code = 4'h3; cfg_scale = 2'd1;
    @(negedge clk); cfg_we = 0;
    check(code != 4'h3 || scale != 2'd1 || exp_active == {2'd1, 4'h3}, "not yet active after one edge");
    @(negedge clk);
    check(code == 4'h3 && scale == 2'd1, "active after two edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
