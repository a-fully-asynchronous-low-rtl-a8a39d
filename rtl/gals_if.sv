// GALS interface between a router's local port and a synchronous IP unit.
//
// Two FIFOs of five words with Johnson-encoded pointers decouple the NoC and
// the IP clock domains: the A-S FIFO carries flits from the router to the IP,
// the S-A FIFO from the IP to the router. Both VCs share each FIFO (no VC
// arbitration inside the interface): every entry holds the VC number with the
// 34-bit flit, and flits leave in arrival order.
//
// NoC side (noc_clk): the router output sends a flit only when it holds an
// accept token for its VC. The interface returns one token on noc_in_acc[vc]
// each time the IP has consumed a flit of that VC; the count of consumed
// flits per VC crosses back to the NoC domain as a Johnson counter through
// two flip-flops. Towards the router input, the interface keeps CREDITS tokens
// per VC and forwards the S-A FIFO head only when its VC holds one; tokens
// come back on noc_out_acc.
//
// IP side (ip_clk, generated here): send/accept protocol. A flit goes to the
// IP when ip_rx_send and ip_rx_accept are both high at an ip_clk edge; a flit
// comes from the IP when ip_tx_send and ip_tx_accept are both high. One flit
// per cycle in each direction.
//
// Local clock: delay_line_prog holds the setting written by the IP
// (ip_cfg_*; ip_cfg_busy while an update is applied), clock_gen produces ip_clk from it; ip_clk also clocks the IP
// side of the interface.
// The FIFO depth, Johnson pointers, two-flop synchronizers, shared VC FIFOs,
// send/accept protocol and the local programmable clock follow the interface
// description; the token return scheme is this design's own.
module gals_if
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 5,
  parameter int unsigned CREDITS    = VC_DEPTH
) (
  input  logic              noc_clk,
  input  logic              rst_n,
  // from router local output
  input  logic              noc_in_send,
  input  logic              noc_in_vc,
  input  flit_t             noc_in_flit,
  output logic [NUM_VC-1:0] noc_in_acc,
  // to router local input
  output logic              noc_out_send,
  output logic              noc_out_vc,
  output flit_t             noc_out_flit,
  input  logic [NUM_VC-1:0] noc_out_acc,
  // IP side
  output logic              ip_clk,
  output logic              ip_rst_n,
  output logic              ip_rx_send,
  output logic              ip_rx_vc,
  output flit_t             ip_rx_flit,
  input  logic              ip_rx_accept,
  input  logic              ip_tx_send,
  input  logic              ip_tx_vc,
  input  flit_t             ip_tx_flit,
  output logic              ip_tx_accept,
  input  logic              ip_cfg_we,
  input  logic [3:0]        ip_cfg_code,
  input  logic [1:0]        ip_cfg_scale,
  output logic              ip_cfg_busy
);
  localparam int unsigned W  = FLIT_W + 1;
  localparam int unsigned JW = 3;           // token Johnson counter: 6 states > CREDITS

  // ---------------- local clock ----------------
  logic [3:0] code;
  logic [1:0] scale;
  logic [1:0] ip_rst_sync;

  clock_gen u_clk (.rst_n, .code, .scale, .clk_out(ip_clk));

  // reset released synchronously to the generated clock
  always_ff @(posedge ip_clk or negedge rst_n)
    if (!rst_n) ip_rst_sync <= '0;
    else        ip_rst_sync <= {ip_rst_sync[0], 1'b1};
  assign ip_rst_n = ip_rst_sync[1];

  delay_line_prog u_prog (
    .clk (ip_clk), .rst_n (ip_rst_n),
    .cfg_we (ip_cfg_we), .cfg_code (ip_cfg_code), .cfg_scale (ip_cfg_scale),
    .code, .scale, .busy (ip_cfg_busy)
  );

  // ---------------- A-S direction ----------------
  logic          as_full, as_empty, as_rd;
  logic [W-1:0]  as_rdata;

  johnson_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_as (
    .wclk (noc_clk), .wrst_n (rst_n), .wr_en (noc_in_send),
    .wdata ({noc_in_vc, noc_in_flit}), .full (as_full),
    .rclk (ip_clk), .rrst_n (ip_rst_n), .rd_en (as_rd),
    .rdata (as_rdata), .empty (as_empty)
  );
  assign ip_rx_send = !as_empty;
  assign ip_rx_vc   = as_rdata[FLIT_W];
  assign ip_rx_flit = as_rdata[FLIT_W-1:0];
  assign as_rd      = ip_rx_send && ip_rx_accept;

  // tokens of consumed flits back to the NoC side
  for (genvar v = 0; v < NUM_VC; v++) begin : g_tok
    logic [JW-1:0] ip_cnt, sync1, sync2, noc_cnt;
    always_ff @(posedge ip_clk or negedge ip_rst_n)
      if (!ip_rst_n) ip_cnt <= '0;
      else if (as_rd && (ip_rx_vc == 1'(v))) ip_cnt <= {ip_cnt[JW-2:0], ~ip_cnt[JW-1]};
    always_ff @(posedge noc_clk or negedge rst_n)
      if (!rst_n) begin
        sync1 <= '0; sync2 <= '0; noc_cnt <= '0;
      end else begin
        sync1 <= ip_cnt;
        sync2 <= sync1;
        if (noc_cnt != sync2) noc_cnt <= {noc_cnt[JW-2:0], ~noc_cnt[JW-1]};
      end
    assign noc_in_acc[v] = (noc_cnt != sync2);
  end

  a_as_room : assert property (@(posedge noc_clk) disable iff (!rst_n) noc_in_send |-> !as_full)
    else $error("A-S FIFO written while full: accept tokens exceed its room");

  // ---------------- S-A direction ----------------
  logic          sa_full, sa_empty, sa_rd;
  logic [W-1:0]  sa_rdata;
  localparam int unsigned CW = $clog2(CREDITS + 1);
  logic [NUM_VC-1:0][CW-1:0] credit;

  johnson_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_sa (
    .wclk (ip_clk), .wrst_n (ip_rst_n), .wr_en (ip_tx_send),
    .wdata ({ip_tx_vc, ip_tx_flit}), .full (sa_full),
    .rclk (noc_clk), .rrst_n (rst_n), .rd_en (sa_rd),
    .rdata (sa_rdata), .empty (sa_empty)
  );
  assign ip_tx_accept = !sa_full;
  assign noc_out_vc   = sa_rdata[FLIT_W];
  assign noc_out_flit = sa_rdata[FLIT_W-1:0];
  assign sa_rd        = !sa_empty && (credit[noc_out_vc] != '0);
  assign noc_out_send = sa_rd;

  always_ff @(posedge noc_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < int'(NUM_VC); v++) credit[v] <= CW'(CREDITS);
    end else begin
      for (int v = 0; v < int'(NUM_VC); v++)
        credit[v] <= credit[v] + CW'(noc_out_acc[v])
                   - CW'(sa_rd && (noc_out_vc == 1'(v)));
    end
  end
endmodule
