// Test wrapper of one router: five input test cells (ITC), five output test
// cells (OTC) and a wrapper control module (WCM), controlled through a 2-wire
// configuration chain.
//
// Configuration chain: cfg_in carries one symbol per clock, dual-rail coded:
// 2'b01 is a 0, 2'b10 is a 1, 2'b00 is no symbol and 2'b11 is the UPDATE
// command. Every data symbol shifts the WCM's 41-bit register one place
// (new bit in at the top, bit 0 out on cfg_out, so the wrappers of a NoC form
// one chain); UPDATE is forwarded on cfg_out and makes every wrapper apply
// its register:
//   bit 0      go: inject the test flit once
//   bits 2:1   mode: 0 functional, 1 router test, 2 link test
//   bits 5:3   port (N, E, S, W, R = 0..4)
//   bit 6      VC of the test flit
//   bits 40:7  test flit (BOP, EOP, 32-bit payload)
// The first flit captured after an UPDATE is written back into the same
// register in the same layout (bit 0 = 1 marks a capture, mode field = the
// mode in force), so the next shift brings the result out while the next
// test is shifted in, as in a boundary scan.
//
// Modes:
//  * functional: all cells are transparent and the router works normally.
//  * router test: the ITC of 'port' injects the test flit into the router;
//    every OTC captures what the router sends and returns its accept token
//    at once, so the router never stalls; the network links see nothing.
//  * link test: the OTC of 'port' sends the test flit on its output link
//    (bypassing the router); every ITC captures a flit arriving from its
//    input link and returns the accept token; accept tokens arriving from
//    the links are absorbed. A flit sent by one wrapper in link test is
//    captured by the neighbour's wrapper, also in link test.
// The test modes are meant for a NoC without functional traffic.
//
// What follows the wrapper description: five ITCs and five OTCs around the
// router, one WCM, a 2-bit configuration chain, test flits injected into the
// router and observed at its outputs, and links tested between wrappers.
// The symbol code, the register layout, the three modes and the single
// capture per update are this design's own choices.
module test_wrapper
  import noc_pkg::*;
#(
  parameter bit          APD         = 1'b1,
  parameter int unsigned IDLE_CYCLES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // network side, as the router's ports
  input  logic [NUM_PORTS-1:0]          in_send,
  input  logic [NUM_PORTS-1:0]          in_vc,
  input  flit_t [NUM_PORTS-1:0]         in_flit,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0] in_acc,
  output logic [NUM_PORTS-1:0]          out_send,
  output logic [NUM_PORTS-1:0]          out_vc,
  output flit_t [NUM_PORTS-1:0]         out_flit,
  input  logic [NUM_PORTS-1:0]          out_ready,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0] out_acc,
  output logic                          low_power,
  // configuration chain
  input  logic [1:0]                    cfg_in,
  output logic [1:0]                    cfg_out
);
  localparam int unsigned SR_W = 1 + 2 + 3 + 1 + FLIT_W;

  typedef enum logic [1:0] {M_FUNC = 2'd0, M_ROUTER = 2'd1, M_LINK = 2'd2} mode_e;

  // router pins
  logic  [NUM_PORTS-1:0]             r_in_send, r_in_vc, r_out_send, r_out_vc, r_out_ready;
  flit_t [NUM_PORTS-1:0]             r_in_flit, r_out_flit;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0] r_in_acc, r_out_acc;

  anoc_router #(.APD(APD), .IDLE_CYCLES(IDLE_CYCLES)) u_router (
    .clk, .rst_n,
    .in_send (r_in_send), .in_vc (r_in_vc), .in_flit (r_in_flit), .in_acc (r_in_acc),
    .out_send (r_out_send), .out_vc (r_out_vc), .out_flit (r_out_flit),
    .out_ready (r_out_ready), .out_acc (r_out_acc),
    .low_power
  );

  // ---------------- WCM ----------------
  logic [SR_W-1:0] sr;
  mode_e           mode;
  logic [2:0]      port;
  logic            tvc;
  flit_t           tflit;
  logic            go_pending, captured;
  logic            inject;       // test flit leaves this cycle
  logic            cap_valid;    // a cell captures a flit this cycle
  logic [2:0]      cap_port;
  logic            cap_vc;
  flit_t           cap_flit;
  logic            is_data, is_update;

  assign is_data   = (cfg_in == 2'b01) || (cfg_in == 2'b10);
  assign is_update = (cfg_in == 2'b11);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr         <= '0;
      mode       <= M_FUNC;
      port       <= '0;
      tvc        <= 1'b0;
      tflit      <= '0;
      go_pending <= 1'b0;
      captured   <= 1'b0;
      cfg_out    <= 2'b00;
    end else begin
      cfg_out <= 2'b00;
      if (is_data) begin
        cfg_out <= sr[0] ? 2'b10 : 2'b01;
        sr      <= {cfg_in[1], sr[SR_W-1:1]};
      end else if (is_update) begin
        cfg_out    <= 2'b11;
        go_pending <= sr[0];
        mode       <= mode_e'((sr[2:1] == 2'd3) ? 2'd0 : sr[2:1]);
        port       <= sr[5:3];
        tvc        <= sr[6];
        tflit      <= sr[SR_W-1:7];
        captured   <= 1'b0;
      end else begin
        if (inject) go_pending <= 1'b0;
        if (cap_valid && !captured) begin
          captured <= 1'b1;
          sr       <= {cap_flit, cap_vc, cap_port, mode, 1'b1};
        end
      end
    end
  end

  // ---------------- test cells ----------------
  logic [NUM_PORTS-1:0][NUM_VC-1:0] otc_tok, itc_tok;   // tokens returned by the cells

  always_comb begin
    inject    = 1'b0;
    cap_valid = 1'b0;
    cap_port  = '0;
    cap_vc    = 1'b0;
    cap_flit  = '0;
    for (int p = 0; p < int'(NUM_PORTS); p++) begin
      // defaults: functional mode, cells transparent
      r_in_send[p]   = in_send[p];
      r_in_vc[p]     = in_vc[p];
      r_in_flit[p]   = in_flit[p];
      in_acc[p]      = r_in_acc[p];
      out_send[p]    = r_out_send[p];
      out_vc[p]      = r_out_vc[p];
      out_flit[p]    = r_out_flit[p];
      r_out_ready[p] = out_ready[p];
      r_out_acc[p]   = out_acc[p];
      if (mode == M_ROUTER) begin
        // ITC: inject on the selected port, block the link
        r_in_send[p] = go_pending && (port == 3'(p));
        r_in_vc[p]   = tvc;
        r_in_flit[p] = tflit;
        in_acc[p]    = '0;
        // OTC: capture and sink
        out_send[p]    = 1'b0;
        r_out_ready[p] = 1'b1;
        r_out_acc[p]   = otc_tok[p];
        if (r_out_send[p] && !cap_valid) begin
          cap_valid = 1'b1; cap_port = 3'(p); cap_vc = r_out_vc[p]; cap_flit = r_out_flit[p];
        end
      end else if (mode == M_LINK) begin
        // OTC: send the test flit on the selected link
        r_in_send[p]   = 1'b0;
        r_out_ready[p] = 1'b0;
        r_out_acc[p]   = '0;
        out_send[p]    = go_pending && (port == 3'(p)) && out_ready[p];
        out_vc[p]      = tvc;
        out_flit[p]    = tflit;
        // ITC: capture from the link and return its token
        in_acc[p]      = itc_tok[p];
        if (in_send[p] && !cap_valid) begin
          cap_valid = 1'b1; cap_port = 3'(p); cap_vc = in_vc[p]; cap_flit = in_flit[p];
        end
      end
    end
    if (mode == M_ROUTER) inject = go_pending;
    if (mode == M_LINK)   inject = go_pending && (port < 3'(NUM_PORTS)) && out_ready[port];
  end

  // cells return an accept token the cycle after they sink a flit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      otc_tok <= '0;
      itc_tok <= '0;
    end else begin
      for (int p = 0; p < int'(NUM_PORTS); p++)
        for (int v = 0; v < int'(NUM_VC); v++) begin
          otc_tok[p][v] <= (mode == M_ROUTER) && r_out_send[p] && (r_out_vc[p] == 1'(v));
          itc_tok[p][v] <= (mode == M_LINK) && in_send[p] && (in_vc[p] == 1'(v));
        end
    end
  end
endmodule
