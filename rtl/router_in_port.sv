// Router input port: VC demultiplexer, path shifter, per-VC flit queues,
// packet signalling towards the output ports and accept-token gathering.
//
// A flit arriving with in_send is steered by in_vc into the queue of its
// virtual channel. When the flit is a header (BOP), the low two bits of its
// path field give the turn code; the output port is derived from it and the
// input port's own position (noc_pkg::turn_to_port), and the path field is
// shifted right by two bits before the flit is stored, so that the next
// router finds its own turn code in the low bits. The chosen output port is
// kept for the body flits that follow, until the EOP flit.
//
// Each VC queue holds VC_DEPTH flits (two, as the flow control allows at most
// two flits per VC in an input port). The head flit of each VC is offered to
// the output port it is routed to (head_valid/head_dir/head_flit); a header at
// the head raises pkt_req towards that output only (signal packet). An output
// port that moves the head flit into its own buffer pulses take[vc]. Accept
// tokens returned by the output ports for flits of this input (acc_from_out)
// are gathered per VC and sent upstream on in_acc, one token per cycle
// (gather accepts): two outputs can return a token of the same VC in the same
// cycle, when the tail of one packet and the head of the next leave through
// different outputs, and the second token then goes out a cycle later.
//
// Timing: a flit is stored at the clock edge where in_send is high and is at
// the queue head from the next cycle. Queue overflow cannot occur when the
// upstream side respects its credits; an assertion checks it.
// Synchronous modelling of the handshake channels (one clock edge per flit
// transfer) is this design's choice; the stage order follows the port's
// micro-architecture (VC demux, shifter, buffer, signal packet, gather
// accepts).
module router_in_port
  import noc_pkg::*;
#(
  parameter logic [2:0] PORT_ID = 3'd0,
  parameter int unsigned DEPTH  = VC_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // link from upstream
  input  logic                       in_send,
  input  logic                       in_vc,
  input  flit_t                      in_flit,
  output logic [NUM_VC-1:0]          in_acc,
  // towards the output ports
  output logic [NUM_VC-1:0]          head_valid,
  output logic [NUM_VC-1:0][2:0]     head_dir,
  output flit_t [NUM_VC-1:0]         head_flit,
  output logic [NUM_VC-1:0][NUM_PORTS-1:0] pkt_req,
  input  logic [NUM_VC-1:0]          take,
  input  logic [NUM_VC-1:0][NUM_PORTS-1:0] acc_from_out
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    flit_t      flit;
    logic [2:0] dir;
  } entry_t;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    entry_t            mem [DEPTH];
    logic [PW-1:0]     wr_ptr, rd_ptr;
    logic [PW:0]       count;
    logic [2:0]        cur_dir;     // output of the packet being received
    logic              wr, rd;
    entry_t            new_entry;

    // VC demux and shifter
    assign wr = in_send && (in_vc == 1'(v));
    always_comb begin
      new_entry.flit = in_flit;
      new_entry.dir  = cur_dir;
      if (in_flit.bop) begin
        new_entry.dir  = turn_to_port(PORT_ID, in_flit.data[1:0]);
        new_entry.flit = shift_path(in_flit);
      end
    end
    assign rd = take[v];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wr_ptr  <= '0;
        rd_ptr  <= '0;
        count   <= '0;
        cur_dir <= 3'(PORT_R);
      end else begin
        if (wr) begin
          mem[wr_ptr] <= new_entry;
          wr_ptr      <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
          cur_dir     <= new_entry.dir;
        end
        if (rd) rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
        count <= count + (PW+1)'(wr) - (PW+1)'(rd);
      end
    end

    assign head_valid[v] = (count != '0);
    assign head_flit[v]  = mem[rd_ptr].flit;
    assign head_dir[v]   = mem[rd_ptr].dir;

    // signal packet: only a header at the head requests an output
    for (genvar o = 0; o < NUM_PORTS; o++) begin : g_req
      assign pkt_req[v][o] = head_valid[v] && head_flit[v].bop && (head_dir[v] == 3'(o));
    end

    // gather accepts: tokens from several outputs in one cycle are merged
    // into a sequence of single tokens, one per cycle
    logic [2:0] owed, arriving;
    always_comb begin
      arriving = '0;
      for (int o = 0; o < int'(NUM_PORTS); o++) arriving += 3'(acc_from_out[v][o]);
    end
    assign in_acc[v] = (owed != '0) || (arriving != '0);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) owed <= '0;
      else        owed <= owed + arriving - 3'(in_acc[v]);

    a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
      wr |-> (count < (PW+1)'(DEPTH)) || rd)
      else $error("input port %0d VC%0d queue overflow", PORT_ID, v);
    a_take_valid : assert property (@(posedge clk) disable iff (!rst_n)
      rd |-> head_valid[v])
      else $error("input port %0d VC%0d read while empty", PORT_ID, v);
  end

endmodule
