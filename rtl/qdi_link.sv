// Pipelined NoC link: carries one router-to-router direction of a NoC port.
//
// The forward channel (flit and VC number, 35 bits padded to 36) is sent as
// 18 digits on a QDI 4-phase 4-rail channel through STAGES WCHB pipeline
// stages (qdi_tx, qdi_wchb_stage..., qdi_rx). Pipeline stages cut the
// handshake loop over a long wire; about one stage per millimetre of wire is
// enough, hence the default of one stage for a link spanning one tile.
// The sender side shows 'ready' (tx_ready) to the router output port, which
// only sends when the channel is idle.
//
// The accept tokens going back (one wire per VC) are delayed by the same
// number of stages, as plain registered pulses; encoding them as QDI
// channels too is left out. With STAGES = 0 the sender drives the receiver
// directly.
//
// Timing (clocked model, one register per C-element level): rx_send is high
// in the cycle that ends STAGES+1 edges after the edge where the sender took
// the flit. The four-phase loop sets the rate: with one stage the link takes
// a new flit every 7 clocks (5 with no stage).
module qdi_link
  import noc_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // sender (upstream router output port)
  input  logic              tx_send,
  input  logic              tx_vc,
  input  flit_t             tx_flit,
  output logic              tx_ready,
  output logic [NUM_VC-1:0] tx_acc,
  // receiver (downstream router input port)
  output logic              rx_send,
  output logic              rx_vc,
  output flit_t             rx_flit,
  input  logic [NUM_VC-1:0] rx_acc
);
  localparam int unsigned NDIG = 18;

  logic [NDIG-1:0][3:0] rails [STAGES+1];
  logic                 ack_n [STAGES+1];
  logic [2*NDIG-1:0]    rx_word;

  qdi_tx #(.NDIG(NDIG)) u_tx (
    .clk, .rst_n,
    .valid (tx_send),
    .ready (tx_ready),
    .data  ({1'b0, tx_vc, tx_flit}),
    .rails (rails[0]),
    .ack_n (ack_n[0])
  );

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    qdi_wchb_stage #(.NDIG(NDIG)) u_stage (
      .clk, .rst_n,
      .rails_in  (rails[s]),
      .ack_n_in  (ack_n[s]),
      .rails_out (rails[s+1]),
      .ack_n_out (ack_n[s+1])
    );
  end

  qdi_rx #(.NDIG(NDIG)) u_rx (
    .clk, .rst_n,
    .rails (rails[STAGES]),
    .ack_n (ack_n[STAGES]),
    .valid (rx_send),
    .data  (rx_word)
  );
  assign rx_vc   = rx_word[FLIT_W];
  assign rx_flit = rx_word[FLIT_W-1:0];

  // accept tokens back, STAGES registers deep
  logic [NUM_VC-1:0] acc_pipe [STAGES+1];
  assign acc_pipe[0] = rx_acc;
  for (genvar s = 0; s < STAGES; s++) begin : g_acc
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) acc_pipe[s+1] <= '0;
      else        acc_pipe[s+1] <= acc_pipe[s];
  end
  assign tx_acc = acc_pipe[STAGES];

  a_send_ready : assert property (@(posedge clk) disable iff (!rst_n) tx_send |-> tx_ready)
    else $error("flit sent on a busy link");
endmodule
