// Router output port: per-VC direction arbitration and switching, then
// flit-level VC arbitration onto the output link, with credit-based
// send/accept flow control.
//
// Each VC has a direction arbiter that grants, fairly (round robin), one of
// the four input ports requesting a new packet (pkt_req, raised by a header
// at the head of that input's queue). The grant is a command token held in
// the direction FIFO (here one entry: the selected input index) until the EOP
// flit of the packet has passed the direction switch, so the path stays open
// for the whole packet (wormhole). The direction switch moves flits of the
// selected input into a one-flit VC buffer and pulses take[vc][i] so the input
// port dequeues them.
//
// The VC arbiter then chooses, flit by flit and round robin, between the two
// VC buffers whose downstream VC still holds an accept token (credit), and
// drives out_send/out_vc/out_flit for one cycle. Sending consumes one
// downstream token and produces one upstream accept token, returned on
// acc_to_in[vc][i] to the input port the flit came from (signal accept).
// Downstream tokens come back on out_acc; each VC starts with CREDITS tokens,
// the room of the downstream input queue.
//
// out_ready lets the link refuse a flit (a handshake link still busy); en
// gates the VC arbiter, which the router uses to slow the port down in its
// low-power mode.
// The stage order follows the output-port micro-architecture; round-robin
// VC arbitration, the single-entry buffers and the clocked handshakes are
// this design's choices.
module router_out_port
  import noc_pkg::*;
#(
  parameter int unsigned NIN     = 4,
  parameter int unsigned CREDITS = VC_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  // from the input ports
  input  logic [NUM_VC-1:0][NIN-1:0]    pkt_req,
  input  logic [NUM_VC-1:0][NIN-1:0]    in_valid,
  input  flit_t [NUM_VC-1:0][NIN-1:0]   in_flit,
  output logic [NUM_VC-1:0][NIN-1:0]    take,
  output logic [NUM_VC-1:0][NIN-1:0]    acc_to_in,
  // output link
  output logic                          out_send,
  output logic                          out_vc,
  output flit_t                         out_flit,
  input  logic                          out_ready,
  input  logic [NUM_VC-1:0]             out_acc,
  // status
  output logic [NUM_VC-1:0]             busy
);

  localparam int unsigned IW = $clog2(NIN);
  localparam int unsigned CW = $clog2(CREDITS + 1);

  logic [NUM_VC-1:0]          buf_valid;
  flit_t [NUM_VC-1:0]         buf_flit;
  logic [NUM_VC-1:0][IW-1:0]  buf_src;
  logic [NUM_VC-1:0][CW-1:0]  credit;
  logic [NUM_VC-1:0]          vc_req, vc_gnt;
  logic                       vc_idx, vc_any;
  logic [NUM_VC-1:0]          sent;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic [NIN-1:0] dgnt;
    logic [IW-1:0]  dgnt_idx;
    logic           dany, grant_new;
    logic [IW-1:0]  sel;          // direction FIFO: token of the open packet
    logic           mv;

    // direction arbiter: only while no packet is open on this VC
    assign grant_new = !busy[v] && dany;
    rr_arbiter #(.N(NIN)) u_dir_arb (
      .clk, .rst_n,
      .req     (busy[v] ? '0 : pkt_req[v]),
      .advance (grant_new),
      .gnt     (dgnt),
      .gnt_idx (dgnt_idx),
      .any     (dany)
    );

    // direction switch into the VC buffer
    assign mv = busy[v] && in_valid[v][sel] && (!buf_valid[v] || sent[v]);
    always_comb begin
      take[v] = '0;
      take[v][sel] = mv;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy[v]      <= 1'b0;
        sel          <= '0;
        buf_valid[v] <= 1'b0;
        buf_src[v]   <= '0;
        buf_flit[v]  <= '0;
        credit[v]    <= CW'(CREDITS);
      end else begin
        if (grant_new) begin
          busy[v] <= 1'b1;
          sel     <= dgnt_idx;
        end else if (mv && in_flit[v][sel].eop) begin
          busy[v] <= 1'b0;
        end
        if (mv) begin
          buf_valid[v] <= 1'b1;
          buf_flit[v]  <= in_flit[v][sel];
          buf_src[v]   <= sel;
        end else if (sent[v]) begin
          buf_valid[v] <= 1'b0;
        end
        credit[v] <= credit[v] + CW'(out_acc[v]) - CW'(sent[v]);
      end
    end

    assign vc_req[v] = buf_valid[v] && (credit[v] != '0) && out_ready && en;
    assign sent[v]   = vc_gnt[v];

    // signal accept: upstream token to the input the flit came from
    always_comb begin
      acc_to_in[v] = '0;
      acc_to_in[v][buf_src[v]] = sent[v];
    end

    a_credit_range : assert property (@(posedge clk) disable iff (!rst_n)
      credit[v] <= CW'(CREDITS))
      else $error("output port VC%0d holds more accept tokens than queue room", v);
  end

  // VC arbiter and VC switch
  rr_arbiter #(.N(NUM_VC)) u_vc_arb (
    .clk, .rst_n,
    .req     (vc_req),
    .advance (1'b1),
    .gnt     (vc_gnt),
    .gnt_idx (vc_idx),
    .any     (vc_any)
  );

  assign out_send = vc_any;
  assign out_vc   = vc_idx;
  assign out_flit = buf_flit[vc_idx];

endmodule
