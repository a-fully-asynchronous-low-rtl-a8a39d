// Self-checking test of qdi_wchb_stage: drives the input rails and the next
// stage's acknowledge directly and checks, edge by edge, the C-element rule
// (a rail follows its input only when the input equals ack_n_out, otherwise
// holds) and the completion acknowledge ack_n_in (low once every digit has a
// rail high, high again once all rails are low).
module tb_qdi_wchb_stage;
  localparam int ND = 3;
  logic clk = 0, rst_n = 0;
  logic [ND-1:0][3:0] rin = '0, rout, exp_out;
  logic ack_n_in, ack_n_out = 1;
  logic exp_comp;
  int checks = 0, failures = 0;

  qdi_wchb_stage #(.NDIG(ND)) dut (.clk, .rst_n, .rails_in(rin), .ack_n_in,
                                   .rails_out(rout), .ack_n_out);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [ND-1:0][3:0] r, input logic a);
    logic [ND-1:0][3:0] nxt;
    logic all_v, all_e;
    @(negedge clk);
    rin = r; ack_n_out = a;
    all_v = 1; all_e = 1;
    for (int d = 0; d < ND; d++) begin
      all_v &= (exp_out[d] != 0);
      all_e &= (exp_out[d] == 0);
    end
    for (int d = 0; d < ND; d++)
      for (int b = 0; b < 4; b++)
        nxt[d][b] = (r[d][b] == a) ? a : exp_out[d][b];
    if (all_v) exp_comp = 1; else if (all_e) exp_comp = 0;
    exp_out = nxt;
    @(posedge clk); #1;
    checks++;
    if (rout !== exp_out || ack_n_in !== !exp_comp) begin
      failures++;
      $display("FAIL rails %h exp %h ack_n_in %b exp %b", rout, exp_out, ack_n_in, !exp_comp);
    end
  endtask

  initial begin
    exp_out = '0; exp_comp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one full 4-phase transfer with the next stage ready
    step('{4'b0010, 4'b0001, 4'b1000}, 1);
    step('{4'b0010, 4'b0001, 4'b1000}, 1);
    checks++; if (ack_n_in) begin failures++; $display("FAIL: no acknowledge after word"); end
    step('{4'b0010, 4'b0001, 4'b1000}, 0);   // next stage took it
    step('0, 0);                              // return to zero
    step('0, 0);
    checks++; if (!ack_n_in) begin failures++; $display("FAIL: acknowledge not released"); end
    // next stage busy: a new word must wait
    step('{4'b0100, 4'b0100, 4'b0001}, 0);
    checks++; if (rout != '0) begin failures++; $display("FAIL: word passed a busy stage"); end
    step('{4'b0100, 4'b0100, 4'b0001}, 1);
    // random legal-ish sequences
    for (int i = 0; i < 300; i++) begin
      logic [ND-1:0][3:0] r;
      for (int d = 0; d < ND; d++) r[d] = ($urandom % 2) ? (4'b0001 << ($urandom % 4)) : 4'b0000;
      step(r, 1'($urandom % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
