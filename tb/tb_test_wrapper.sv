// Self-checking test of test_wrapper, driving its configuration chain.
//  * Functional mode: a packet W -> E crosses the wrapper as through the
//    bare router.
//  * Router test: a one-flit packet injected at port W with the turn code for
//    E, then at R towards N, then on VC1 at S towards W; the result shifted
//    out must show the capture flag, mode 1, the output port, the VC and the
//    flit with its path shifted; nothing may reach the network links.
//  * Link test: the test flit leaves on output link S; a flit arriving on
//    input link N is captured and shifted out, and its accept token returned.
//  * Chain: symbols leave cfg_out in order, one per clock, UPDATE forwarded.
module tb_test_wrapper;
  import noc_pkg::*;
  localparam int SR_W = 41;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_send = '0, in_vc = '0, out_send, out_vc, out_ready = '1;
  flit_t [4:0] in_flit = '0, out_flit;
  logic [4:0][1:0] in_acc, out_acc = '0;
  logic low_power;
  logic [1:0] cfg_in = 2'b00, cfg_out;
  int checks = 0, failures = 0;
  int net_out = 0;
  logic [SR_W-1:0] shifted_out;
  int n_out_sym = 0, n_update_fwd = 0;

  test_wrapper dut (.*);
  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (cfg_out == 2'b01 || cfg_out == 2'b10) begin
      shifted_out = {cfg_out[1], shifted_out[SR_W-1:1]};
      n_out_sym++;
    end
    if (cfg_out == 2'b11) n_update_fwd++;
  end

  // shift a 41-bit word in (bit 0 first), collecting what comes out, then UPDATE
  task automatic shift_update(input logic [SR_W-1:0] w, output logic [SR_W-1:0] old);
    for (int i = 0; i < SR_W; i++) begin
      @(negedge clk); cfg_in = w[i] ? 2'b10 : 2'b01;
    end
    @(negedge clk); cfg_in = 2'b11;
    @(negedge clk); cfg_in = 2'b00;
    @(negedge clk);
    old = shifted_out;
  endtask

  function automatic logic [SR_W-1:0] word(bit go, int mode, int port, bit vc, flit_t f);
    return {f, vc, 3'(port), 2'(mode), go};
  endfunction

  function automatic flit_t one_flit(int in_p, int out_p, logic [11:0] tag);
    flit_t f;
    f.bop = 1; f.eop = 1;
    f.data = {tag, 18'h2A5A5 & 18'h3FFFC, 2'b00};
    f.data[1:0] = 2'((out_p - in_p - 1 + 10) % 5);
    return f;
  endfunction

  always @(posedge clk) if (rst_n && dut.mode == 2'd1 && out_send != '0) net_out++;
  int link_sent = 0;
  flit_t link_flit;
  logic link_vc;
  always @(posedge clk) if (rst_n && dut.mode == 2'd2 && out_send[2]) begin
    link_sent++; link_flit = out_flit[2]; link_vc = out_vc[2];
  end

  task automatic router_test(int in_p, int out_p, bit vc, logic [11:0] tag);
    logic [SR_W-1:0] res;
    flit_t f, e;
    f = one_flit(in_p, out_p, tag);
    e = f; e.data[19:0] = f.data[19:0] >> 2;
    shift_update(word(1, 1, in_p, vc, f), res);
    repeat (10) @(posedge clk);
    shift_update(word(0, 1, 0, 0, '0), res);     // read the result, stay in router test
    check(res[0] == 1'b1, "capture flag");
    check(res[2:1] == 2'd1, "mode field of the result");
    check(int'(res[5:3]) == out_p, $sformatf("router test %0d->%0d: captured at port %0d", in_p, out_p, res[5:3]));
    check(res[6] == vc, "captured VC");
    check(flit_t'(res[SR_W-1:7]) == e, "captured flit with shifted path");
  endtask

  initial begin
    logic [SR_W-1:0] res, pattern;
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // functional mode: W -> E
    @(negedge clk);
    in_send[3] = 1; in_vc[3] = 0; in_flit[3] = one_flit(3, 1, 12'h123);
    @(negedge clk); in_send[3] = 0;
    lat = 0;
    while (!out_send[1] && lat < 20) begin @(negedge clk); lat++; end
    check(out_send[1] && out_flit[1].data[31:20] == 12'h123, "functional mode passes the router");
    repeat (3) @(negedge clk);
    out_acc[1] = 2'b01; @(negedge clk); out_acc[1] = 2'b00;
    // chain order: shift a pattern in, then shift it out
    pattern = SR_W'({$urandom, $urandom});
    pattern[2:1] = 2'd0;                  // functional mode
    pattern[0] = 1'b0;
    n_out_sym = 0; n_update_fwd = 0;
    shift_update(pattern, res);
    shift_update(pattern ^ '1, res);
    check(res == pattern, "configuration register shifts out in order");
    check(n_out_sym == 2 * SR_W && n_update_fwd == 2, "one symbol per clock and UPDATE forwarded");
    shift_update('0, res);
    // router tests
    net_out = 0;
    router_test(3, 1, 0, 12'hA01);
    router_test(4, 0, 0, 12'hA02);
    router_test(2, 3, 1, 12'hA03);
    check(net_out == 0, "nothing reaches the links in router test");
    // link test: send on S
    shift_update(word(1, 2, 2, 1, one_flit(4, 2, 12'hB01)), res);
    repeat (5) @(negedge clk);
    check(link_sent == 1, $sformatf("link test flit sent once on S (%0d)", link_sent));
    check(link_vc && link_flit.data[31:20] == 12'hB01, "link test flit content");
    // link test: capture from N
    @(negedge clk);
    in_send[0] = 1; in_vc[0] = 1; in_flit[0] = one_flit(0, 2, 12'hC01);
    @(negedge clk); in_send[0] = 0;
    check(in_acc[0] == 2'b10, "accept token returned for the captured link flit");
    shift_update('0, res);
    check(res[0] && res[2:1] == 2'd2 && res[5:3] == 3'd0 && res[6] == 1'b1 &&
          flit_t'(res[SR_W-1:7]) == one_flit(0, 2, 12'hC01), "link test capture at N");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
