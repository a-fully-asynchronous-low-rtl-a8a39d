// Dual-clock FIFO with Johnson-encoded pointers (GALS interface A-S and S-A
// FIFOs).
//
// Write and read pointers are DEPTH-bit Johnson counters: 2*DEPTH states,
// one bit changing per step, so a pointer can be passed to the other clock
// domain through a plain SYNC_STAGES flip-flop synchronizer and is always
// seen either at its old or at its new value. The FIFO is empty when both
// pointers are equal and full when the write pointer equals the bitwise
// complement of the read pointer (DEPTH steps ahead). The storage slot of a
// pointer is its step count modulo DEPTH: the number of ones while the MSB
// is 0, the number of zeros while it is 1.
//
// Write side: wdata is stored at the wclk edge where wr_en is high and full
// is low. Read side: rdata shows the oldest word while empty is low and is
// removed at the rclk edge where rd_en is high. A written word is seen by the
// reader SYNC_STAGES rclk edges after the write edge.
// Depth 5, Johnson pointers and two synchronizer flip-flops follow the
// interface description; the rest is this design's own.
module johnson_fifo #(
  parameter int unsigned WIDTH       = 35,
  parameter int unsigned DEPTH       = 5,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH-1:0] wptr, rptr;
  logic [DEPTH-1:0] wsync [SYNC_STAGES];   // read pointer seen by the writer
  logic [DEPTH-1:0] rsync [SYNC_STAGES];   // write pointer seen by the reader

  function automatic logic [DEPTH-1:0] jnext(input logic [DEPTH-1:0] j);
    return {j[DEPTH-2:0], ~j[DEPTH-1]};
  endfunction

  function automatic logic [IW-1:0] jslot(input logic [DEPTH-1:0] j);
    int unsigned n;
    n = 0;
    for (int i = 0; i < int'(DEPTH); i++) n += (j[i] != j[DEPTH-1]) ? 1 : 0;
    // MSB 0: slot = number of ones; MSB 1: slot = number of zeros
    return IW'(n);
  endfunction

  // write domain
  assign full = (wptr == ~wsync[SYNC_STAGES-1]);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr <= '0;
      for (int s = 0; s < int'(SYNC_STAGES); s++) wsync[s] <= '0;
    end else begin
      wsync[0] <= rptr;
      for (int s = 1; s < int'(SYNC_STAGES); s++) wsync[s] <= wsync[s-1];
      if (wr_en && !full) wptr <= jnext(wptr);
    end
  end
  always_ff @(posedge wclk)
    if (wr_en && !full) mem[jslot(wptr)] <= wdata;

  // read domain
  assign empty = (rptr == rsync[SYNC_STAGES-1]);
  assign rdata = mem[jslot(rptr)];
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr <= '0;
      for (int s = 0; s < int'(SYNC_STAGES); s++) rsync[s] <= '0;
    end else begin
      rsync[0] <= wptr;
      for (int s = 1; s < int'(SYNC_STAGES); s++) rsync[s] <= rsync[s-1];
      if (rd_en && !empty) rptr <= jnext(rptr);
    end
  end
endmodule
