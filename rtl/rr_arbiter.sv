// Round-robin arbiter: grants one of N requests, starting the search just
// after the last granted index, so every requester is served in turn. The
// grant is combinational; the priority pointer advances at the clock edge
// where 'advance' is high. Used for the fair direction arbitration and for
// the flit-level VC arbitration of the router output port.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!any && req[idx]) begin
        any          = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last <= IW'(N-1);
    else if (advance && any)   last <= gnt_idx;
  end
endmodule
