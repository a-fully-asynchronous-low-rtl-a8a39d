// Asynchronous NoC of a GALS chip: NX x NY 2D mesh of five-port routers,
// pipelined links between neighbouring routers, and at each router a GALS
// interface to one synchronous IP unit running on its own locally generated
// clock.
//
// Node (x, y) has index y*NX + x; x grows eastwards, y southwards. Its
// router's E port is linked to the W port of node (x+1, y) and its S port to
// the N port of node (x, y+1), one qdi_link per direction with LINK_STAGES
// pipeline stages. Ports on the mesh border are left unconnected (they never
// receive a flit and are never routed to). The R port of each router is
// wired pin to pin to the node's gals_if. The IP units are outside this
// module: every node's IP-side send/accept interface, generated clock and
// clock-programming inputs are brought out as arrays indexed by node.
//
// With DFT = 1 every router sits in a test_wrapper and the wrappers form one
// configuration chain, from cfg_in through node 0, 1, ... to cfg_out: the
// only test pins of the NoC. With cfg_in held at 2'b00 the wrappers are
// transparent.
//
// A packet is routed by the turn codes in the low bits of its header flit
// (see noc_pkg): the IP that sends it builds the path, two bits per router
// crossed, the last code leading to the destination's R port.
//
// noc_clk stands for one handshake phase of the asynchronous logic: the
// routers and links, asynchronous in the real circuit, are modelled as
// clocked logic. The 5x3 size and one link stage per tile follow the chip
// description; the coordinate convention and border handling are this
// design's choices.
module anoc_top
  import noc_pkg::*;
#(
  parameter int unsigned NX          = 5,
  parameter int unsigned NY          = 3,
  parameter int unsigned LINK_STAGES = 1,
  parameter bit          APD         = 1'b1,
  parameter int unsigned IDLE_CYCLES = 16,
  parameter bit          DFT         = 1'b1
) (
  input  logic                noc_clk,
  input  logic                rst_n,
  output logic [NX*NY-1:0]    ip_clk,
  output logic [NX*NY-1:0]    ip_rst_n,
  output logic [NX*NY-1:0]    ip_rx_send,
  output logic [NX*NY-1:0]    ip_rx_vc,
  output flit_t [NX*NY-1:0]   ip_rx_flit,
  input  logic [NX*NY-1:0]    ip_rx_accept,
  input  logic [NX*NY-1:0]    ip_tx_send,
  input  logic [NX*NY-1:0]    ip_tx_vc,
  input  flit_t [NX*NY-1:0]   ip_tx_flit,
  output logic [NX*NY-1:0]    ip_tx_accept,
  input  logic [NX*NY-1:0]    ip_cfg_we,
  input  logic [NX*NY-1:0][3:0] ip_cfg_code,
  input  logic [NX*NY-1:0][1:0] ip_cfg_scale,
  output logic [NX*NY-1:0]    ip_cfg_busy,
  output logic [NX*NY-1:0]    low_power,
  // test configuration chain through the router test wrappers
  input  logic [1:0]          cfg_in,
  output logic [1:0]          cfg_out
);
  localparam int unsigned NN = NX * NY;

  // router pins [node][port]
  logic  [NN-1:0][NUM_PORTS-1:0]             r_in_send, r_in_vc, r_out_send, r_out_vc, r_out_ready;
  flit_t [NN-1:0][NUM_PORTS-1:0]             r_in_flit, r_out_flit;
  logic  [NN-1:0][NUM_PORTS-1:0][NUM_VC-1:0] r_in_acc, r_out_acc;
  // link receiver side, indexed by the sending node and port
  logic  [NN-1:0][NUM_PORTS-1:0]             l_rx_send, l_rx_vc;
  flit_t [NN-1:0][NUM_PORTS-1:0]             l_rx_flit;
  logic  [NN:0][1:0]                         cfg_chain;

  assign cfg_chain[0] = cfg_in;
  assign cfg_out      = cfg_chain[NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int X = n % NX;
    localparam int Y = n / NX;

    if (DFT) begin : g_dft
      test_wrapper #(.APD(APD), .IDLE_CYCLES(IDLE_CYCLES)) u_wrap (
        .clk       (noc_clk),
        .rst_n,
        .in_send   (r_in_send[n]),
        .in_vc     (r_in_vc[n]),
        .in_flit   (r_in_flit[n]),
        .in_acc    (r_in_acc[n]),
        .out_send  (r_out_send[n]),
        .out_vc    (r_out_vc[n]),
        .out_flit  (r_out_flit[n]),
        .out_ready (r_out_ready[n]),
        .out_acc   (r_out_acc[n]),
        .low_power (low_power[n]),
        .cfg_in    (cfg_chain[n]),
        .cfg_out   (cfg_chain[n+1])
      );
    end else begin : g_bare
      anoc_router #(.APD(APD), .IDLE_CYCLES(IDLE_CYCLES)) u_router (
        .clk       (noc_clk),
        .rst_n,
        .in_send   (r_in_send[n]),
        .in_vc     (r_in_vc[n]),
        .in_flit   (r_in_flit[n]),
        .in_acc    (r_in_acc[n]),
        .out_send  (r_out_send[n]),
        .out_vc    (r_out_vc[n]),
        .out_flit  (r_out_flit[n]),
        .out_ready (r_out_ready[n]),
        .out_acc   (r_out_acc[n]),
        .low_power (low_power[n])
      );
      assign cfg_chain[n+1] = cfg_chain[n];
    end

    gals_if u_gals (
      .noc_clk,
      .rst_n,
      .noc_in_send  (r_out_send[n][PORT_R]),
      .noc_in_vc    (r_out_vc[n][PORT_R]),
      .noc_in_flit  (r_out_flit[n][PORT_R]),
      .noc_in_acc   (r_out_acc[n][PORT_R]),
      .noc_out_send (r_in_send[n][PORT_R]),
      .noc_out_vc   (r_in_vc[n][PORT_R]),
      .noc_out_flit (r_in_flit[n][PORT_R]),
      .noc_out_acc  (r_in_acc[n][PORT_R]),
      .ip_clk       (ip_clk[n]),
      .ip_rst_n     (ip_rst_n[n]),
      .ip_rx_send   (ip_rx_send[n]),
      .ip_rx_vc     (ip_rx_vc[n]),
      .ip_rx_flit   (ip_rx_flit[n]),
      .ip_rx_accept (ip_rx_accept[n]),
      .ip_tx_send   (ip_tx_send[n]),
      .ip_tx_vc     (ip_tx_vc[n]),
      .ip_tx_flit   (ip_tx_flit[n]),
      .ip_tx_accept (ip_tx_accept[n]),
      .ip_cfg_we    (ip_cfg_we[n]),
      .ip_cfg_code  (ip_cfg_code[n]),
      .ip_cfg_scale (ip_cfg_scale[n]),
      .ip_cfg_busy  (ip_cfg_busy[n])
    );
    assign r_out_ready[n][PORT_R] = 1'b1;

    for (genvar p = 0; p < 4; p++) begin : g_port
      // neighbour across port p, and the port it is seen through there
      localparam int NXB = (p == PORT_E) ? X + 1 : (p == PORT_W) ? X - 1 : X;
      localparam int NYB = (p == PORT_S) ? Y + 1 : (p == PORT_N) ? Y - 1 : Y;
      localparam int unsigned OPP = (p + 2) % 4;
      localparam bit HAS = (NXB >= 0) && (NXB < int'(NX)) && (NYB >= 0) && (NYB < int'(NY));
      if (HAS) begin : g_link
        localparam int unsigned M = NYB * NX + NXB;
        qdi_link #(.STAGES(LINK_STAGES)) u_link (
          .clk      (noc_clk),
          .rst_n,
          .tx_send  (r_out_send[n][p]),
          .tx_vc    (r_out_vc[n][p]),
          .tx_flit  (r_out_flit[n][p]),
          .tx_ready (r_out_ready[n][p]),
          .tx_acc   (r_out_acc[n][p]),
          .rx_send  (l_rx_send[n][p]),
          .rx_vc    (l_rx_vc[n][p]),
          .rx_flit  (l_rx_flit[n][p]),
          .rx_acc   (r_in_acc[M][OPP])
        );
        // this node's input p is fed by the neighbour's link towards us
        assign r_in_send[n][p] = l_rx_send[M][OPP];
        assign r_in_vc[n][p]   = l_rx_vc[M][OPP];
        assign r_in_flit[n][p] = l_rx_flit[M][OPP];
      end else begin : g_edge
        assign r_out_ready[n][p] = 1'b1;
        assign r_out_acc[n][p]   = '0;
        assign r_in_send[n][p]   = 1'b0;
        assign r_in_vc[n][p]     = 1'b0;
        assign r_in_flit[n][p]   = '0;
        assign l_rx_send[n][p]   = 1'b0;
        assign l_rx_vc[n][p]     = 1'b0;
        assign l_rx_flit[n][p]   = '0;
        a_no_edge_send : assert property (@(posedge noc_clk) disable iff (!rst_n) !r_out_send[n][p])
          else $error("node %0d routed a flit off the mesh through port %0d", n, p);
      end
    end
  end

endmodule
