// Self-checking test of qdi_link with its default single pipeline stage:
// random flits on random VCs are sent whenever the link is ready and must
// arrive unchanged and in order; the handshake period (7 clocks per flit
// with one stage: 4 phases, each crossing the tx, stage and rx registers)
// and the forward latency (receiver valid sampled STAGES+1 = 2 edges after
// the send edge) are checked; accept tokens must come back
// delayed by one register per stage.
module tb_qdi_link;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_send = 0, tx_vc = 0, tx_ready, rx_send, rx_vc;
  flit_t tx_flit = '0, rx_flit;
  logic [1:0] tx_acc, rx_acc = '0;
  int checks = 0, failures = 0;
  logic [FLIT_W:0] model [$];
  longint cyc = 0, last_send = -1, send_cyc = 0;
  int periods_ok = 0;

  qdi_link dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: order, content, latency
  always @(posedge clk) if (rst_n && rx_send) begin
    check(model.size() > 0 && {rx_vc, rx_flit} == model[0], "flit content/order");
    check(cyc - send_cyc == 2, $sformatf("latency %0d", cyc - send_cyc));
    if (model.size() > 0) void'(model.pop_front());
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      tx_send = 1; tx_vc = 1'($urandom); tx_flit = flit_t'({$urandom, $urandom});
      @(posedge clk);
      model.push_back({tx_vc, tx_flit});
      send_cyc = cyc;
      if (last_send >= 0) check(cyc - last_send == 7, $sformatf("period %0d", cyc - last_send));
      last_send = cyc;
      #1 tx_send = 0;
    end
    repeat (20) @(posedge clk);
    check(model.size() == 0, "all flits delivered");
    // accept tokens: one register stage
    @(negedge clk); rx_acc = 2'b10;
    @(negedge clk); rx_acc = 2'b00;
    check(tx_acc == 2'b10, "accept token delayed by one stage");
    @(negedge clk);
    check(tx_acc == 2'b00, "accept token is a single pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
