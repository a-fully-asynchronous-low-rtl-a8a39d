// Five-port wormhole router with two virtual channels.
//
// Ports N, E, S, W connect to the neighbouring routers of the 2D mesh and
// port R to the local GALS interface. Each port has one input link
// (in_send, in_vc, in_flit, with accept tokens in_acc going back) and one
// output link (out_send, out_vc, out_flit, with accept tokens out_acc coming
// back and out_ready from the link). There is no central arbiter: each input
// port routes its packets from the header's path field and each output port
// arbitrates among the four other inputs (no U-turn), per VC and then between
// VCs.
//
// Output port o sees input k (k = 0..3) = input port (o + 1 + k) mod 5, the
// same order as the turn codes (noc_pkg::turn_to_port).
//
// With APD = 1 a power_down_ctrl slows all output ports to one flit every
// four cycles after a period without traffic (automatic power down); with
// APD = 0 the bare router always runs at full rate.
//
// Timing: from a header flit on an idle path to the same flit on the output
// link takes three clock edges (queue, direction grant, switch into the
// output buffer); body flits then stream at one per cycle when credits allow.
// The port structure follows the router architecture; the clocked model
// of the handshakes is this design's choice.
module anoc_router
  import noc_pkg::*;
#(
  parameter bit          APD         = 1'b1,
  parameter int unsigned IDLE_CYCLES = 16,
  parameter int unsigned WAKE_CYCLES = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NUM_PORTS-1:0]          in_send,
  input  logic [NUM_PORTS-1:0]          in_vc,
  input  flit_t [NUM_PORTS-1:0]         in_flit,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0] in_acc,
  output logic [NUM_PORTS-1:0]          out_send,
  output logic [NUM_PORTS-1:0]          out_vc,
  output flit_t [NUM_PORTS-1:0]         out_flit,
  input  logic [NUM_PORTS-1:0]          out_ready,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0] out_acc,
  output logic                          low_power
);

  localparam int unsigned NIN = NUM_PORTS - 1;

  logic [NUM_PORTS-1:0][NUM_VC-1:0]                head_valid;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][2:0]           head_dir;
  flit_t [NUM_PORTS-1:0][NUM_VC-1:0]               head_flit;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][NUM_PORTS-1:0] pkt_req;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]                take_in;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][NUM_PORTS-1:0] acc_in;   // [in][vc][out]

  logic [NUM_PORTS-1:0][NUM_VC-1:0][NIN-1:0]       op_req, op_valid, op_take, op_acc;
  flit_t [NUM_PORTS-1:0][NUM_VC-1:0][NIN-1:0]      op_flit;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]                op_busy;
  logic                                            en;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    router_in_port #(.PORT_ID(3'(p))) u_in (
      .clk, .rst_n,
      .in_send      (in_send[p]),
      .in_vc        (in_vc[p]),
      .in_flit      (in_flit[p]),
      .in_acc       (in_acc[p]),
      .head_valid   (head_valid[p]),
      .head_dir     (head_dir[p]),
      .head_flit    (head_flit[p]),
      .pkt_req      (pkt_req[p]),
      .take         (take_in[p]),
      .acc_from_out (acc_in[p])
    );
  end

  // crossbar wiring between input ports and output ports
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_x
    for (genvar v = 0; v < NUM_VC; v++) begin : g_v
      for (genvar k = 0; k < NIN; k++) begin : g_k
        localparam int unsigned I = (o + 1 + k) % NUM_PORTS;
        assign op_req[o][v][k]   = pkt_req[I][v][o];
        assign op_valid[o][v][k] = head_valid[I][v] && (head_dir[I][v] == 3'(o));
        assign op_flit[o][v][k]  = head_flit[I][v];
      end
    end
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_back
    for (genvar v = 0; v < NUM_VC; v++) begin : g_v
      logic [NUM_PORTS-1:0] t;
      for (genvar o = 0; o < NUM_PORTS; o++) begin : g_o
        localparam int unsigned K = (i + NUM_PORTS - o - 1) % NUM_PORTS;
        if (o == i) begin : g_self
          assign t[o]            = 1'b0;
          assign acc_in[i][v][o] = 1'b0;
        end else begin : g_other
          assign t[o]            = op_take[o][v][K];
          assign acc_in[i][v][o] = op_acc[o][v][K];
        end
      end
      assign take_in[i][v] = |t;
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    router_out_port #(.NIN(NIN)) u_out (
      .clk, .rst_n,
      .en        (en),
      .pkt_req   (op_req[o]),
      .in_valid  (op_valid[o]),
      .in_flit   (op_flit[o]),
      .take      (op_take[o]),
      .acc_to_in (op_acc[o]),
      .out_send  (out_send[o]),
      .out_vc    (out_vc[o]),
      .out_flit  (out_flit[o]),
      .out_ready (out_ready[o]),
      .out_acc   (out_acc[o]),
      .busy      (op_busy[o])
    );
  end

  if (APD) begin : g_apd
    power_down_ctrl #(.IDLE_CYCLES(IDLE_CYCLES), .WAKE_CYCLES(WAKE_CYCLES)) u_apd (
      .clk, .rst_n,
      .activity  ((|in_send) || (|head_valid) || (|op_busy)),
      .low_power (low_power),
      .en        (en)
    );
  end else begin : g_bare
    assign en        = 1'b1;
    assign low_power = 1'b0;
  end

endmodule
