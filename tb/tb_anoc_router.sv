// Self-checking test of anoc_router. The testbench is the upstream and the
// downstream side of all five ports.
//  * A lone header on an idle router leaves on its output port 3 clock edges
//    after it was sent in.
//  * Random traffic: 12 packets per input port and VC, 1 to 5 flits each,
//    each to a random one of the four other ports, sent only with accept
//    tokens; random downstream token return and random link-busy. Checked:
//    output port of every flit, path field shifted by two bits in headers,
//    order per source, VC and output, no interleaving of packets on an output VC, at
//    most two flits in flight per downstream VC, and token count.
//  * After the traffic the router powers down; a packet sent then still
//    arrives, with gaps of at least four cycles between flits on the output.
module tb_anoc_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_send = '0, in_vc = '0, out_send, out_vc, out_ready = '1;
  flit_t [4:0] in_flit = '0, out_flit;
  logic [4:0][1:0] in_acc, out_acc = '0;
  logic low_power;
  int checks = 0, failures = 0;

  anoc_router dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { flit_t f; int dst; } exp_t;
  flit_t gen_q [5][2][$];          // flits waiting to be sent, per input/VC
  exp_t  exp_q [5][2][5][$];       // expected arrival, per source input/VC/output
  int    credit [5][2];
  int    inflight [5][2];
  int    ret_delay [5][2][$];
  int    open_src [5][2];
  int    total = 0, received = 0;
  bit    run = 0;
  longint cyc = 0;
  longint last_out [5];
  int    min_gap_lp = 1000;
  int    n_low_power = 0, n_link_busy = 0, n_credit_stall = 0;

  function automatic void make_packet(int src, int v, int dst, int seq_base, int len);
    int code = (dst - src - 1 + 10) % 5;
    for (int k = 0; k < len; k++) begin
      flit_t f;
      exp_t e;
      f.bop = (k == 0); f.eop = (k == len - 1);
      f.data = $urandom;
      f.data[31:28] = 4'(src); f.data[27] = 1'(v); f.data[26:20] = 7'(seq_base + k);
      if (f.bop) f.data[1:0] = 2'(code);
      e.f = f; e.dst = dst;
      if (f.bop) e.f.data[19:0] = f.data[19:0] >> 2;
      gen_q[src][v].push_back(f);
      exp_q[src][v][dst].push_back(e);
      total++;
    end
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // upstream side of every input
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 5; p++) begin
      for (int v = 0; v < 2; v++) if (in_acc[p][v]) credit[p][v]++;
      in_send[p] <= 1'b0;
      if (run) begin
        int v;
        v = $urandom % 2;
        if (gen_q[p][v].size() > 0 && credit[p][v] > 0 && ($urandom % 3 != 0)) begin
          credit[p][v]--;
          in_send[p] <= 1'b1;
          in_vc[p]   <= 1'(v);
          in_flit[p] <= gen_q[p][v].pop_front();
        end else if (gen_q[p][v].size() > 0 && credit[p][v] == 0) n_credit_stall++;
      end
    end
  end

  // downstream side of every output
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) begin
      out_acc[o] <= '0;
      if (out_send[o]) begin
        int s, v;
        s = int'(out_flit[o].data[31:28]);
        v = int'(out_vc[o]);
        check(out_ready[o], "send only on a ready link");
        check(s < 5 && s != o && exp_q[s][v][o].size() > 0, $sformatf("flit from %0d VC%0d expected on port %0d", s, v, o));
        if (s < 5 && exp_q[s][v][o].size() > 0) begin
          check(exp_q[s][v][o][0].f == out_flit[o], "flit content and order (path shifted in header)");
          void'(exp_q[s][v][o].pop_front());
        end
        if (out_flit[o].bop) begin
          check(open_src[o][v] == -1, "no interleaving on an output VC");
          open_src[o][v] = s;
        end else check(open_src[o][v] == s, "body flit follows its header");
        if (out_flit[o].eop) open_src[o][v] = -1;
        inflight[o][v]++;
        check(inflight[o][v] <= 2, "at most two flits in flight per VC");
        ret_delay[o][v].push_back($urandom % 4);
        if (low_power && last_out[o] >= 0) begin
          if (int'(cyc - last_out[o]) < min_gap_lp) min_gap_lp = int'(cyc - last_out[o]);
        end
        last_out[o] = cyc;
        received++;
      end
      for (int v = 0; v < 2; v++)
        if (ret_delay[o][v].size() > 0) begin
          if (ret_delay[o][v][0] == 0) begin
            void'(ret_delay[o][v].pop_front());
            out_acc[o][v] <= 1'b1;
            inflight[o][v]--;
          end else ret_delay[o][v][0]--;
        end
      out_ready[o] <= run ? ($urandom % 5 != 0) : 1'b1;
      if (run && !out_ready[o]) n_link_busy++;
    end
    if (low_power) n_low_power++;
  end

  initial begin
    int lat;
    for (int p = 0; p < 5; p++) begin
      last_out[p] = -1;
      for (int v = 0; v < 2; v++) begin credit[p][v] = 2; inflight[p][v] = 0; open_src[p][v] = -1; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency of a lone header, W -> E
    make_packet(3, 0, 1, 0, 1);
    @(negedge clk);
    in_send[3] = 1; in_vc[3] = 0; in_flit[3] = gen_q[3][0].pop_front(); credit[3][0]--;
    @(posedge clk); #1 in_send[3] = 0;
    lat = 0;
    while (!out_send[1] && lat < 20) begin @(posedge clk); #1; lat++; end
    check(lat == 2, $sformatf("header crossed the router in %0d edges", lat + 1));
    repeat (5) @(posedge clk);
    // random traffic
    for (int p = 0; p < 5; p++)
      for (int v = 0; v < 2; v++) begin
        int seq;
        seq = 0;
        for (int k = 0; k < 12; k++) begin
          int len, dst;
          len = 1 + $urandom % 5;
          dst = (p + 1 + $urandom % 4) % 5;
          make_packet(p, v, dst, seq, len);
          seq += len;
        end
      end
    run = 1;
    wait (received == total);
    run = 0;
    for (int p = 0; p < 5; p++) for (int v = 0; v < 2; v++)
      for (int o = 0; o < 5; o++) check(exp_q[p][v][o].size() == 0, "all flits delivered");
    // idle: power down, then a 6-flit packet at reduced rate
    repeat (30) @(posedge clk);
    check(low_power, "router powered down when idle");
    for (int p = 0; p < 5; p++) last_out[p] = -1;
    make_packet(0, 1, 2, 0, 6);
    run = 1;
    wait (received == total);
    run = 0;
    check(min_gap_lp >= 4, $sformatf("flit gap %0d cycles in power-down mode", min_gap_lp));
    repeat (10) @(posedge clk);
    for (int p = 0; p < 5; p++) for (int v = 0; v < 2; v++)
      check(credit[p][v] == 2, $sformatf("all accept tokens returned upstream: port %0d VC%0d holds %0d", p, v, credit[p][v]));
    check(n_low_power > 0, "power-down mode seen");
    check(n_credit_stall > 0, "credit stall seen");
    check(n_link_busy > 0, "busy link seen");
    $display("power-down cycles %0d, credit stalls %0d, busy-link cycles %0d", n_low_power, n_credit_stall, n_link_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
