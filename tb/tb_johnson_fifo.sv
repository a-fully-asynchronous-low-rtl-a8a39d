// Self-checking test of johnson_fifo: random writes and reads across two
// unrelated clocks; data order checked against a queue model, full/empty
// checked against the depth (5 words fill it), and the two-edge read-side
// latency of a single word checked.
module tb_johnson_fifo;
  localparam int W = 35;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  johnson_fifo #(.WIDTH(W)) dut (.wclk, .wrst_n(rst_n), .wr_en, .wdata, .full,
                                 .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  int nwritten = 0, nread = 0;
  bit random_phase = 0;
  always @(posedge wclk) if (rst_n && random_phase) begin
    if (wr_en && !full) begin model.push_back(wdata); nwritten++; end
    wr_en <= ($urandom % 3 != 0) && nwritten < 400;
    wdata <= W'({$urandom, $urandom});
  end
  always @(posedge rclk) if (rst_n && random_phase) begin
    if (rd_en && !empty) begin
      check(model.size() > 0 && rdata == model[0], $sformatf("data order at read %0d", nread));
      void'(model.pop_front());
      nread++;
    end
    rd_en <= ($urandom % 3 != 0);
  end

  initial begin
    int cnt;
    repeat (3) @(posedge wclk);
    rst_n = 1;
    // fill: exactly 5 words are taken before full
    cnt = 0;
    check(empty, "empty after reset");
    repeat (8) begin
      @(negedge wclk);
      if (!full) begin wr_en = 1; wdata = W'(100 + cnt); cnt++; end
      else wr_en = 0;
      @(posedge wclk); #1 wr_en = 0;
    end
    check(cnt == 5, $sformatf("depth: %0d words before full", cnt));
    check(full, "full after 5 writes");
    // drain and check order
    for (int i = 0; i < 5; i++) begin
      @(negedge rclk);
      while (empty) @(negedge rclk);
      check(rdata == W'(100 + i), $sformatf("drain word %0d", i));
      rd_en = 1; @(posedge rclk); #1 rd_en = 0;
    end
    repeat (4) @(posedge rclk);
    check(empty, "empty after drain");
    // latency of one word on the read side: SYNC_STAGES = 2 rclk edges
    @(negedge wclk); wr_en = 1; wdata = W'(7); @(posedge wclk); #1 wr_en = 0;
    cnt = 0;
    @(posedge rclk); #1;
    while (empty) begin cnt++; @(posedge rclk); #1; end
    check(cnt == 1 || cnt == 2, $sformatf("read-side latency %0d extra edges", cnt));
    rd_en = 1; @(posedge rclk); #1 rd_en = 0;
    // random traffic
    random_phase = 1;
    wait (nread == 400);
    check(nwritten == 400, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
