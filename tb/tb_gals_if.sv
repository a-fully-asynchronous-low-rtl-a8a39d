// Self-checking test of gals_if. The testbench plays the router on the NoC
// side (noc_clk, 1 ns period) and the IP on the generated clock side.
//  * NoC -> IP: flits on random VCs, sent only with an accept token (two per
//    VC at start, one more per noc_in_acc pulse); checked in order with VC at
//    the IP, with random ip_rx_accept; a lone flit must be visible at the IP
//    after exactly two ip_clk edges (two-flop synchronizer).
//  * IP -> NoC: random flits; checked in order at noc_out; tokens returned
//    after a random delay; never more than two flits in flight per VC; with
//    the IP sending all the time the interface accepts one flit per cycle.
//  * Clock: reset period 2.5 ns (400 MHz); the IP programs code 0 and the
//    period becomes 1.0 ns (1 GHz) within three cycles of the write.
module tb_gals_if;
  timeunit 1ps;
  timeprecision 1ps;
  import noc_pkg::*;
  logic noc_clk = 0, rst_n = 0;
  logic noc_in_send = 0, noc_in_vc = 0;
  flit_t noc_in_flit = '0;
  logic [1:0] noc_in_acc, noc_out_acc = '0;
  logic noc_out_send, noc_out_vc;
  flit_t noc_out_flit;
  logic ip_clk, ip_rst_n, ip_rx_send, ip_rx_vc, ip_rx_accept = 0;
  flit_t ip_rx_flit, ip_tx_flit = '0;
  logic ip_tx_send = 0, ip_tx_vc = 0, ip_tx_accept;
  logic ip_cfg_we = 0, ip_cfg_busy;
  logic [3:0] ip_cfg_code = '0;
  logic [1:0] ip_cfg_scale = '0;
  int checks = 0, failures = 0;

  gals_if dut (.*);

  initial begin
    #137;
    forever #500 noc_clk = ~noc_clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FLIT_W:0] as_model [$], sa_model [$];
  int credit [2];
  int sa_inflight [2];
  int sa_delay [2][$];
  bit as_run = 0, sa_run = 0, sa_full_rate = 0;
  int as_sent = 0, as_recv = 0, sa_sent = 0, sa_recv = 0;
  localparam int N = 300;

  // NoC side: router output towards the interface
  always @(posedge noc_clk) if (rst_n) begin
    for (int v = 0; v < 2; v++) if (noc_in_acc[v]) credit[v]++;
    if (noc_in_send) begin
      as_model.push_back({noc_in_vc, noc_in_flit});
      as_sent++;
    end
    noc_in_send <= 0;
    if (as_run && as_sent + int'(noc_in_send) < N) begin
      int v;
      v = $urandom % 2;
      if (credit[v] > 0 && ($urandom % 4 != 0)) begin
        credit[v]--;
        noc_in_send <= 1;
        noc_in_vc   <= 1'(v);
        noc_in_flit <= flit_t'({$urandom, $urandom});
      end
    end
  end

  // NoC side: router input from the interface
  always @(posedge noc_clk) if (rst_n) begin
    noc_out_acc <= '0;
    if (noc_out_send) begin
      int v;
      v = int'(noc_out_vc);
      check(sa_model.size() > 0 && {noc_out_vc, noc_out_flit} == sa_model[0], "S-A flit order and content");
      if (sa_model.size() > 0) void'(sa_model.pop_front());
      sa_recv++;
      sa_inflight[v]++;
      check(sa_inflight[v] <= 2, "at most two S-A flits in flight per VC");
      sa_delay[v].push_back(sa_full_rate ? 0 : $urandom % 5);
    end
    for (int v = 0; v < 2; v++)
      if (sa_delay[v].size() > 0) begin
        if (sa_delay[v][0] == 0) begin
          void'(sa_delay[v].pop_front());
          noc_out_acc[v] <= 1'b1;
          sa_inflight[v]--;
        end else sa_delay[v][0]--;
      end
  end

  // IP side
  int ip_tx_count = 0;
  always @(posedge ip_clk) if (ip_rst_n) begin
    if (ip_rx_send && ip_rx_accept) begin
      check(as_model.size() > 0 && {ip_rx_vc, ip_rx_flit} == as_model[0], "A-S flit order and content");
      if (as_model.size() > 0) void'(as_model.pop_front());
      as_recv++;
    end
    if (ip_tx_send && ip_tx_accept) begin
      sa_model.push_back({ip_tx_vc, ip_tx_flit});
      sa_sent++;
      ip_tx_count++;
    end
    ip_rx_accept <= ($urandom % 3 != 0);
    if (sa_run && sa_sent + int'(ip_tx_send && ip_tx_accept) < N) begin
      if (!ip_tx_send || ip_tx_accept) begin
        ip_tx_send <= sa_full_rate ? 1'b1 : 1'($urandom % 2);
        ip_tx_vc   <= 1'($urandom);
        ip_tx_flit <= flit_t'({$urandom, $urandom});
      end
    end else if (ip_tx_accept) ip_tx_send <= 0;
  end

  task automatic ip_period(output longint p);
    longint t0;
    @(posedge ip_clk); t0 = longint'($time);
    @(posedge ip_clk); p = longint'($time) - t0;
  endtask

  initial begin
    longint p;
    int edges;
    credit = '{2, 2};
    sa_inflight = '{0, 0};
    #3000 rst_n = 1;
    wait (ip_rst_n);
    ip_period(p);
    check(p == 2500, $sformatf("reset clock period %0d ps", p));
    // lone flit latency NoC -> IP
    @(posedge noc_clk); #1;
    noc_in_send = 1; noc_in_vc = 0; noc_in_flit = flit_t'(64'h1234);
    credit[0]--;
    @(posedge noc_clk); #1;
    noc_in_send = 0;
    edges = 0;
    while (!ip_rx_send) begin @(posedge ip_clk); #1; edges++; end
    check(edges == 2, $sformatf("A-S latency %0d ip_clk edges", edges));
    // full-rate IP -> NoC stream
    sa_full_rate = 1; sa_run = 1;
    repeat (5) @(posedge ip_clk);
    ip_tx_count = 0;
    repeat (40) @(posedge ip_clk);
    check(ip_tx_count >= 39, $sformatf("S-A accepted %0d flits in 40 cycles", ip_tx_count));
    sa_full_rate = 0;
    // random traffic both ways
    as_run = 1;
    wait (as_recv == N && sa_recv == N);
    check(as_model.size() == 0 && sa_model.size() == 0, "everything delivered");
    // program the clock to 1 GHz
    @(negedge ip_clk); ip_cfg_we = 1; ip_cfg_code = 4'd0; ip_cfg_scale = 2'd0;
    @(negedge ip_clk); ip_cfg_we = 0;
    repeat (2) @(posedge ip_clk);
    ip_period(p);
    check(p == 1000, $sformatf("programmed clock period %0d ps", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
