// Load test of anoc_top at its default size (5x3 mesh, one link stage):
// throughput of one NoC path and of the whole NoC under a telecom-sized load.
//
// The reference load is a baseband receiver task that moves about 150000
// flits through the NoC in about 250 us, and needs 200 Mflit/s on a NoC
// path to keep up with real time. Which islands talk to which is not known
// here, so the load is uniform random traffic between the 15 IPs.
//
// Phase 1 (one path): node 0 streams STREAM_FLITS flits in 16-flit packets
// on VC0 to node NN-1, six routers away; the receiving IP always accepts.
// The delivered rate, measured between the first and the last flit, must be
// at least 200 Mflit/s.
// Phase 2 (whole NoC): every IP sends TOTAL_FLITS/NN flits in packets of 1
// to 8 flits, random VC, to random other nodes, as fast as the NoC accepts;
// receivers accept three cycles in four. All 150000 flits must arrive, in
// order per source, destination and VC and with the path field shifted once
// per router crossed, within 250 us.
//
// All IP clocks run at 1 GHz; noc_clk has a 450 ps period (one handshake
// phase). Rates are therefore those of the clocked model, not of silicon.
module tb_anoc_load;
  timeunit 1ps;
  timeprecision 1ps;
  import noc_pkg::*;
  localparam int NX = 5, NY = 3, NN = NX * NY;
  localparam int STREAM_FLITS = 2000;
  localparam int TOTAL_FLITS  = 150000;
  localparam longint WINDOW_PS = 250_000_000;   // 250 us

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
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  int recv_flits = 0;
  int phase = 0;            // 1: single stream, 2: whole NoC
  longint t_first = -1, t_last = 0;
  int pkt_cnt [NN];
  int to_send [NN];         // flits each IP still has to generate

  for (genvar n = 0; n < NN; n++) begin : g_ip
    logic  tx_send_l = 1'b0, tx_vc_l = 1'b0, rx_accept_l = 1'b1;
    flit_t tx_flit_l = '0;
    assign ip_tx_send[n]   = tx_send_l;
    assign ip_tx_vc[n]     = tx_vc_l;
    assign ip_tx_flit[n]   = tx_flit_l;
    assign ip_rx_accept[n] = rx_accept_l;
    flit_t tx_q [$];
    logic  tx_vcq [$];

    // build one packet into the transmit queue and the expected queue
    task automatic make_packet(input int dst, input int len, input int v);
      int hops;
      logic [19:0] path;
      hops = route(n, dst, path);
      for (int j = 0; j < len; j++) begin
        flit_t f, e;
        f.bop = (j == 0); f.eop = (j == len - 1);
        f.data = $urandom;
        f.data[31:28] = 4'(n);
        f.data[27:20] = 8'(pkt_cnt[n] * 8 + j);
        if (f.bop) f.data[19:0] = path;
        e = f;
        if (f.bop) e.data[19:0] = path >> (2 * hops);
        tx_q.push_back(f);
        tx_vcq.push_back(1'(v));
        exp_q[n][dst][v].push_back(e);
      end
      pkt_cnt[n]++;
      to_send[n] -= len;
    endtask

    always @(posedge ip_clk[n]) if (rst_n && ip_rst_n[n]) begin
      // keep a few packets queued while this IP still has flits to send
      if (tx_q.size() < 8 && to_send[n] > 0) begin
        if (phase == 1) make_packet(NN - 1, (to_send[n] < 16) ? to_send[n] : 16, 0);
        else if (phase == 2) begin
          int dst, len;
          dst = $urandom % (NN - 1);
          if (dst >= n) dst++;
          len = 1 + $urandom % 8;
          if (len > to_send[n]) len = to_send[n];
          make_packet(dst, len, $urandom % 2);
        end
      end
      // transmit
      if (!ip_tx_send[n] || ip_tx_accept[n]) begin
        if (tx_q.size() > 0) begin
          tx_send_l <= 1'b1;
          tx_flit_l <= tx_q.pop_front();
          tx_vc_l   <= tx_vcq.pop_front();
        end else tx_send_l <= 1'b0;
      end
      // receive
      if (ip_rx_send[n] && ip_rx_accept[n]) begin
        int s, v;
        s = int'(ip_rx_flit[n].data[31:28]);
        v = int'(ip_rx_vc[n]);
        check(s < NN && exp_q[s][n][v].size() > 0, $sformatf("node %0d got an unexpected flit from %0d", n, s));
        if (s < NN && exp_q[s][n][v].size() > 0) begin
          check(ip_rx_flit[n] == exp_q[s][n][v][0], $sformatf("node %0d flit from %0d VC%0d content/order", n, s, v));
          void'(exp_q[s][n][v].pop_front());
        end
        recv_flits++;
        if (t_first < 0) t_first = longint'($time);
        t_last = longint'($time);
      end
      rx_accept_l <= (phase == 1) || ($urandom % 4 != 0);
    end
  end

  initial begin
    longint t0, rate_mfs;
    foreach (pkt_cnt[n]) begin pkt_cnt[n] = 0; to_send[n] = 0; end
    #2000 rst_n = 1;
    wait (&ip_rst_n);
    // every IP programs 1 GHz (delay code 0, no scaling)
    ip_cfg_code = '0;
    ip_cfg_we = '1;
    for (int n = 0; n < NN; n++) @(posedge ip_clk[n]);
    #1 ip_cfg_we = '0;
    #20000;

    // phase 1: one path, node 0 to node NN-1
    to_send[0] = STREAM_FLITS;
    phase = 1;
    wait (recv_flits == STREAM_FLITS);
    // flits per microsecond = Mflit/s
    rate_mfs = (longint'(STREAM_FLITS - 1) * 1_000_000) / (t_last - t_first);
    $display("single path: %0d flits in %0d ps, %0d Mflit/s", STREAM_FLITS, t_last - t_first, rate_mfs);
    check(rate_mfs >= 200, $sformatf("one NoC path sustains 200 Mflit/s (got %0d)", rate_mfs));
    #20000;

    // phase 2: the whole NoC
    recv_flits = 0;
    foreach (to_send[n]) to_send[n] = TOTAL_FLITS / NN;
    t0 = longint'($time);
    phase = 2;
    wait (recv_flits == (TOTAL_FLITS / NN) * NN);
    $display("whole NoC: %0d flits in %0d ns, %0d Mflit/s delivered in total",
             recv_flits, (longint'($time) - t0) / 1000,
             (longint'(recv_flits) * 1_000_000) / (longint'($time) - t0));
    check(longint'($time) - t0 <= WINDOW_PS, "the load is carried within 250 us");
    for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) for (int v = 0; v < 2; v++)
      check(exp_q[s][d][v].size() == 0, "all flits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
