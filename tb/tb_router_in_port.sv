// Self-checking test of router_in_port (as the W port, PORT_ID = 3):
// random packets on both VCs, each VC queue kept within its two-flit limit;
// the output port of every header (expected: (3 + 1 + code) mod 5), the
// shifted path field, the order of flits per VC, the packet request (header
// at the head only) and the gathering of accept tokens (several in a cycle
// leave one per cycle, none lost) are checked.
module tb_router_in_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_send = 0, in_vc = 0;
  flit_t in_flit = '0;
  logic [1:0] in_acc;
  logic [1:0] head_valid, take = '0;
  logic [1:0][2:0] head_dir;
  flit_t [1:0] head_flit;
  logic [1:0][4:0] pkt_req, acc_from_out = '0;
  int checks = 0, failures = 0;

  typedef struct { flit_t f; int dir; } exp_t;
  exp_t q [2][$];
  int cur_dir [2];
  int inflight [2];
  int owed_m [2];
  logic [1:0] exp_acc;

  router_in_port #(.PORT_ID(3'd3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int remaining [2];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    remaining = '{0, 0};
    inflight = '{0, 0};
    owed_m = '{0, 0};
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check heads against the model, then decide takes
      take = '0;
      for (int v = 0; v < 2; v++) begin
        check(head_valid[v] == (q[v].size() > 0), $sformatf("VC%0d head valid", v));
        if (q[v].size() > 0) begin
          check(head_flit[v] == q[v][0].f, $sformatf("VC%0d head flit", v));
          check(int'(head_dir[v]) == q[v][0].dir, $sformatf("VC%0d head dir %0d exp %0d", v, head_dir[v], q[v][0].dir));
          for (int o = 0; o < 5; o++)
            check(pkt_req[v][o] == (q[v][0].f.bop && o == q[v][0].dir), "packet request");
          take[v] = 1'($urandom % 2);
        end else check(pkt_req[v] == '0, "no request when empty");
      end
      // gather accepts: random tokens from outputs, up to two in a cycle,
      // leaving one token per cycle upstream
      for (int v = 0; v < 2; v++) begin
        int r, pop;
        acc_from_out[v] = '0;
        r = $urandom % 20;
        if (r >= 10) acc_from_out[v][$urandom % 5] = 1'b1;
        if (r >= 17) acc_from_out[v][$urandom % 5] = 1'b1;
        pop = $countones(acc_from_out[v]);
        exp_acc[v] = (owed_m[v] + pop) > 0;
        owed_m[v] = owed_m[v] + pop - int'(exp_acc[v]);
      end
      #1 check(in_acc == exp_acc, "gather accepts: one token per cycle, none lost");
      // new flit, only if that VC has room
      in_send = 0;
      begin
        int v;
        v = $urandom % 2;
        if ((q[v].size() - int'(take[v])) < 2 && ($urandom % 4 != 0)) begin
          flit_t f;
          exp_t e;
          f.data = $urandom;
          f.bop  = (remaining[v] == 0);
          if (f.bop) remaining[v] = 1 + $urandom % 4;
          remaining[v]--;
          f.eop  = (remaining[v] == 0);
          in_send = 1; in_vc = 1'(v); in_flit = f;
          e.f = f;
          if (f.bop) begin
            cur_dir[v] = (3 + 1 + int'(f.data[1:0])) % 5;
            e.f.data[19:0] = f.data[19:0] >> 2;
          end
          e.dir = cur_dir[v];
          q[v].push_back(e);
        end
      end
      @(posedge clk);
      for (int v = 0; v < 2; v++) if (take[v]) void'(q[v].pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
