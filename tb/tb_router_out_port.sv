// Self-checking test of router_out_port: four input sources each queue ten
// packets per VC from the start; the downstream side consumes flits at
// random and returns accept tokens, the link is randomly not ready and the
// rate enable randomly low. Checked: packets of one VC are never interleaved
// (wormhole), flits of every source arrive in order, each VC never has more
// flits in flight than the two downstream tokens, nothing is sent while the
// link is busy or the enable is low, every sent flit returns one accept
// token to its own source, and the direction arbiter serves the sources in
// round-robin order (0,1,2,3,0,... since all request all the time).
module tb_router_out_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [1:0][3:0] pkt_req, in_valid, take, acc_to_in;
  flit_t [1:0][3:0] in_flit;
  logic out_send, out_vc, out_ready = 1;
  flit_t out_flit;
  logic [1:0] out_acc = '0, busy;
  int checks = 0, failures = 0;

  router_out_port dut (.*);
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

  flit_t src_q [2][4][$];
  int    exp_seq [2][4];
  int    pkt_order [2][$];
  int    cur_src [2];
  int    downstream [2][$];   // cycles left before each flit is consumed
  int    inflight [2];
  int    acc_count [2][4], sent_count [2][4], total_flits;

  // input-port side: heads and requests, refreshed between clock edges
  always @(negedge clk) begin
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < 4; i++) begin
        in_valid[v][i] = src_q[v][i].size() > 0;
        in_flit[v][i]  = in_valid[v][i] ? src_q[v][i][0] : '0;
        pkt_req[v][i]  = in_valid[v][i] && in_flit[v][i].bop;
      end
  end

  initial begin
    total_flits = 0;
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < 4; i++) begin
        int seq;
        seq = 0;
        exp_seq[v][i] = 0;
        acc_count[v][i] = 0; sent_count[v][i] = 0;
        for (int p = 0; p < 10; p++) begin
          int len;
          len = 1 + $urandom % 4;
          for (int k = 0; k < len; k++) begin
            flit_t f;
            f.bop = (k == 0); f.eop = (k == len - 1);
            f.data = {8'(i), 8'(v), 16'(seq)};
            seq++;
            src_q[v][i].push_back(f);
            total_flits++;
          end
        end
      end
    inflight = '{0, 0};
    cur_src = '{-1, -1};
    in_valid = '0; in_flit = '0; pkt_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  int received = 0;
  always @(posedge clk) if (rst_n) begin
    // checks on what the port does in this cycle
    if (out_send) begin
      int v, s;
      v = int'(out_vc);
      s = int'(out_flit.data[31:24]);
      check(out_ready && en, "send only when link ready and enabled");
      check(inflight[v] < 2, "no send without an accept token");
      check(int'(out_flit.data[23:16]) == v, "flit on its own VC");
      check(int'(out_flit.data[15:0]) == exp_seq[v][s], $sformatf("order of source %0d VC%0d", s, v));
      exp_seq[v][s]++;
      if (out_flit.bop) begin
        check(cur_src[v] == -1, "new packet only after EOP (no interleaving)");
        cur_src[v] = s;
        pkt_order[v].push_back(s);
      end else check(cur_src[v] == s, "body flit from the packet's source");
      if (out_flit.eop) cur_src[v] = -1;
      check(acc_to_in[v] == (4'b1 << s) && acc_to_in[1-v] == '0, "accept token to the flit's source");
      sent_count[v][s]++;
      inflight[v]++;
      downstream[v].push_back(1 + $urandom % 6);
      received++;
    end else check(acc_to_in == '0, "no accept token without a send");
    for (int v = 0; v < 2; v++) for (int i = 0; i < 4; i++) begin
      if (take[v][i]) void'(src_q[v][i].pop_front());
      if (acc_to_in[v][i]) acc_count[v][i]++;
    end
    // downstream consumption and token return
    out_acc <= '0;
    for (int v = 0; v < 2; v++) begin
      if (downstream[v].size() > 0) begin
        if (downstream[v][0] <= 1) begin
          void'(downstream[v].pop_front());
          out_acc[v] <= 1'b1;
          inflight[v]--;
        end else downstream[v][0]--;
      end
    end
    out_ready <= ($urandom % 5 != 0);
    en        <= ($urandom % 6 != 0);
  end

  initial begin
    wait (rst_n);
    wait (received == total_flits);
    repeat (20) @(posedge clk);
    for (int v = 0; v < 2; v++) begin
      for (int i = 0; i < 4; i++)
        check(acc_count[v][i] == sent_count[v][i] && exp_seq[v][i] > 0, "all flits of each source, one token each");
      for (int k = 0; k < 16; k++)
        check(pkt_order[v][k] == k % 4, $sformatf("round-robin grant %0d on VC%0d: %0d", k, v, pkt_order[v][k]));
    end
    check(busy == '0, "no open packet at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
