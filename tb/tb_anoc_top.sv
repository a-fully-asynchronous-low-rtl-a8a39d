// End-to-end test of anoc_top at its default size (5x3 mesh, one link stage).
//
// Every node has an IP model on its own generated clock. Each IP first
// programs its clock to a random frequency of the 400 MHz - 1 GHz range, then
// sends PKTS packets (1 to 4 flits, random VC) to random other nodes, with a
// path of XY turn codes computed here from the coordinates, and receives
// with a randomly stalling accept. noc_clk has a 450 ps period, one
// handshake phase of a 550 Mflit/s four-phase channel.
// Checked: every flit reaches its destination, in order per source,
// destination and VC, with the header's path field shifted once per router
// crossed; no packet interleaving on an IP's VC. At the end the NoC goes
// idle and every router must enter power-down mode.
// Counted, each must happen at least once: packets on each VC, S-A FIFO
// back-pressure (ip_tx_accept low), IP stalls, two packets competing for one
// router output, routers in power-down with traffic arriving (wake-up),
// clock reprogramming taking effect, a router test and a link test through
// the test configuration chain (the results shifted out must match).
module tb_anoc_top;
  timeunit 1ps;
  timeprecision 1ps;
  import noc_pkg::*;
  localparam int NX = 5, NY = 3, NN = NX * NY;
  localparam int PKTS = 12;

  logic noc_clk = 0, rst_n = 0;
  logic [NN-1:0] ip_clk, ip_rst_n, ip_rx_send, ip_rx_vc, ip_rx_accept;
  flit_t [NN-1:0] ip_rx_flit, ip_tx_flit;
  logic [NN-1:0] ip_tx_send, ip_tx_vc, ip_tx_accept;
  logic [NN-1:0] ip_cfg_we = '0, ip_cfg_busy, low_power;
  logic [NN-1:0][3:0] ip_cfg_code = '0;
  logic [NN-1:0][1:0] ip_cfg_scale = '0;
  logic [1:0] cfg_in = 2'b00, cfg_out;
  int checks = 0, failures = 0;

  anoc_top dut (.*);
  always #225 noc_clk = ~noc_clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shift one 41-bit word per node through the chain, node NN-1's first,
  // collecting what comes out, then UPDATE; returns when all are applied
  int n_dft = 0;
  task automatic chain_shift(input logic [NN*41-1:0] w, output logic [NN*41-1:0] old);
    int got;
    got = 0;
    old = '0;
    for (int k = NN - 1; k >= 0; k--)
      for (int i = 0; i < 41; i++) begin
        @(negedge noc_clk); cfg_in = w[k*41 + i] ? 2'b10 : 2'b01;
        @(posedge noc_clk); #1;
        if (cfg_out == 2'b10 || cfg_out == 2'b01) begin
          old = {cfg_out[1], old[NN*41-1:1]};
          got++;
        end
      end
    // UPDATE, then drain the symbols still inside the chain's registers
    for (int i = 0; i < NN + 3; i++) begin
      @(negedge noc_clk); cfg_in = (i == 0) ? 2'b11 : 2'b00;
      @(posedge noc_clk); #1;
      if (cfg_out == 2'b10 || cfg_out == 2'b01) begin
        old = {cfg_out[1], old[NN*41-1:1]};
        got++;
      end
    end
    check(got == NN * 41, $sformatf("chain returned %0d symbols", got));
    // the last node's word comes out first: put word k back at node k
    begin
      logic [NN*41-1:0] r;
      for (int k = 0; k < NN; k++) r[k*41 +: 41] = old[(NN-1-k)*41 +: 41];
      old = r;
    end
  endtask

  // XY route: output ports taken at each router, ending with R at the target
  function automatic int route(input int src, input int dst, output logic [19:0] path);
    int x, y, xd, yd, in_p, out_p, hops;
    x = src % NX; y = src / NX; xd = dst % NX; yd = dst / NX;
    in_p = 4; hops = 0; path = '0;
    forever begin
      if (x < xd)      out_p = 1;
      else if (x > xd) out_p = 3;
      else if (y < yd) out_p = 2;
      else if (y > yd) out_p = 0;
      else             out_p = 4;
      path[2*hops +: 2] = 2'((out_p - in_p - 1 + 10) % 5);
      hops++;
      if (out_p == 4) break;
      if (out_p == 1) x++; else if (out_p == 3) x--; else if (out_p == 2) y++; else y--;
      in_p = (out_p + 2) % 4;
    end
    return hops;
  endfunction

  flit_t exp_q [NN][NN][2][$];
  int sent_flits = 0, recv_flits = 0, total_flits = 0;
  int pkts_vc [2];
  int n_backpressure = 0, n_ip_stall = 0, n_contention = 0, n_wake = 0, n_reprog = 0;
  bit traffic_on = 0;

  for (genvar n = 0; n < NN; n++) begin : g_ip
    logic  tx_send_l = 1'b0, tx_vc_l = 1'b0, rx_accept_l = 1'b0;
    flit_t tx_flit_l = '0;
    assign ip_tx_send[n]   = tx_send_l;
    assign ip_tx_vc[n]     = tx_vc_l;
    assign ip_tx_flit[n]   = tx_flit_l;
    assign ip_rx_accept[n] = rx_accept_l;
    flit_t tx_q [$];
    logic  tx_vcq [$];
    int    open_src [2];
    longint t_last, period;

    initial begin
      open_src = '{-1, -1};
      for (int k = 0; k < PKTS; k++) begin
        int dst, len, hops, v;
        logic [19:0] path;
        dst = $urandom % (NN - 1);
        if (dst >= n) dst++;
        len = 1 + $urandom % 4;
        v = $urandom % 2;
        hops = route(n, dst, path);
        pkts_vc[v]++;
        for (int j = 0; j < len; j++) begin
          flit_t f, e;
          f.bop = (j == 0); f.eop = (j == len - 1);
          f.data = $urandom;
          f.data[31:28] = 4'(n);
          f.data[27:20] = 8'(k * 4 + j);
          if (f.bop) f.data[19:0] = path;
          e = f;
          if (f.bop) e.data[19:0] = path >> (2 * hops);
          tx_q.push_back(f);
          tx_vcq.push_back(1'(v));
          exp_q[n][dst][v].push_back(e);
          total_flits++;
        end
      end
    end

    always @(posedge ip_clk[n]) if (rst_n && ip_rst_n[n]) begin
      // transmit
      if (ip_tx_send[n] && ip_tx_accept[n]) begin sent_flits++; end
      if (ip_tx_send[n] && !ip_tx_accept[n]) n_backpressure++;
      if (!ip_tx_send[n] || ip_tx_accept[n]) begin
        if (traffic_on && tx_q.size() > 0) begin
          tx_send_l <= 1'b1;
          tx_flit_l <= tx_q.pop_front();
          tx_vc_l   <= tx_vcq.pop_front();
        end else tx_send_l <= 1'b0;
      end
      // receive
      if (ip_rx_send[n] && !ip_rx_accept[n]) n_ip_stall++;
      if (ip_rx_send[n] && ip_rx_accept[n]) begin
        int s, v;
        s = int'(ip_rx_flit[n].data[31:28]);
        v = int'(ip_rx_vc[n]);
        check(s < NN && exp_q[s][n][v].size() > 0, $sformatf("node %0d got an unexpected flit from %0d", n, s));
        if (s < NN && exp_q[s][n][v].size() > 0) begin
          check(ip_rx_flit[n] == exp_q[s][n][v][0], $sformatf("node %0d flit from %0d VC%0d content/order", n, s, v));
          void'(exp_q[s][n][v].pop_front());
        end
        if (ip_rx_flit[n].bop) begin
          check(open_src[v] == -1, "no packet interleaving on a VC at the IP");
          open_src[v] = s;
        end else check(open_src[v] == s, "body flit follows its header");
        if (ip_rx_flit[n].eop) open_src[v] = -1;
        recv_flits++;
      end
      rx_accept_l <= ($urandom % 4 != 0);
    end

    // router observation: output contention and power-down wake-ups
    for (genvar o = 0; o < 5; o++) begin : g_o
      always @(posedge noc_clk) if (rst_n)
        for (int v = 0; v < 2; v++)
          if ($countones(dut.g_node[n].g_dft.u_wrap.u_router.g_out[o].u_out.pkt_req[v]) > 1) n_contention++;
    end
    always @(posedge noc_clk) if (rst_n)
      if (low_power[n] && (|dut.g_node[n].g_dft.u_wrap.u_router.in_send)) n_wake++;
  end

  initial begin
    longint t0, p;
    int node;
    #2000 rst_n = 1;
    wait (&ip_rst_n);
    // every IP programs its clock
    for (int n = 0; n < NN; n++) begin
      ip_cfg_code[n] = 4'($urandom);
      ip_cfg_we[n] = 1;
    end
    for (int n = 0; n < NN; n++) @(posedge ip_clk[n]);
    #1 ip_cfg_we = '0;
    n_reprog = NN;
    // the new period of one node is in force within three cycles
    node = $urandom % NN;
    repeat (3) @(posedge ip_clk[node]);
    t0 = longint'($time);
    @(posedge ip_clk[node]);
    p = longint'($time) - t0;
    check(p == 1000 + 100 * longint'(ip_cfg_code[node]), $sformatf("node %0d clock period %0d ps", node, p));
    // traffic
    traffic_on = 1;
    wait (recv_flits == total_flits);
    check(sent_flits == total_flits, "all flits sent");
    for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) for (int v = 0; v < 2; v++)
      check(exp_q[s][d][v].size() == 0, "all flits delivered");
    // DfT: router test of one node through the configuration chain
    begin
      logic [NN*41-1:0] stream, back;
      int tn, out_p;
      flit_t f, e;
      tn = $urandom % NN;
      out_p = $urandom % 4;
      f.bop = 1; f.eop = 1; f.data = 32'hD0F70000;
      f.data[1:0] = 2'((out_p - 4 - 1 + 10) % 5);   // injected at R
      e = f; e.data[19:0] = f.data[19:0] >> 2;
      stream = '0;
      stream[tn*41 +: 41] = {f, 1'b0, 3'd4, 2'd1, 1'b1};
      chain_shift(stream, back);
      repeat (30) @(posedge noc_clk);
      chain_shift('0, back);
      check(back[tn*41 +: 41] == {e, 1'b0, 3'(out_p), 2'd1, 1'b1},
            $sformatf("router test of node %0d through the chain, port %0d", tn, out_p));
      for (int k = 0; k < NN; k++) if (k != tn) check(back[k*41 +: 41] == '0, "other wrappers untouched");
      n_dft++;
    end
    // DfT: link test from one node to its east neighbour
    begin
      logic [NN*41-1:0] stream, back;
      int a;
      flit_t f;
      a = ($urandom % NY) * NX + $urandom % (NX - 1);
      f.bop = 1; f.eop = 1; f.data = 32'h11C0FFEE ^ $urandom;
      stream = '0;
      stream[a*41 +: 41]     = {f, 1'b1, 3'd1, 2'd2, 1'b1};   // OTC E sends on VC1
      stream[(a+1)*41 +: 41] = {34'b0, 1'b0, 3'd0, 2'd2, 1'b0}; // listens
      chain_shift(stream, back);
      repeat (30) @(posedge noc_clk);
      chain_shift('0, back);
      check(back[(a+1)*41 +: 41] == {f, 1'b1, 3'd3, 2'd2, 1'b1},
            $sformatf("link test node %0d -> %0d captured at W", a, a + 1));
      check(back[a*41 +: 41] == stream[a*41 +: 41], "sending wrapper keeps its word");
      n_dft++;
    end
    // idle NoC powers down
    #20000;
    check(&low_power, "every router in power-down mode when the NoC is idle");
    $display("flits %0d, packets VC0 %0d VC1 %0d, back-pressure %0d, IP stalls %0d, contention %0d, power-down wake-ups %0d, clock reprogrammings %0d",
             total_flits, pkts_vc[0], pkts_vc[1], n_backpressure, n_ip_stall, n_contention, n_wake, n_reprog);
    check(pkts_vc[0] > 0 && pkts_vc[1] > 0, "both VCs used");
    check(n_backpressure > 0, "S-A back-pressure seen");
    check(n_ip_stall > 0, "IP receive stall seen");
    check(n_contention > 0, "output contention seen");
    check(n_wake > 0, "traffic into a powered-down router seen");
    check(n_reprog > 0, "clock reprogramming seen");
    check(n_dft == 2, "DfT router and link tests run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
