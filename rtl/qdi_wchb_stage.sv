// One WCHB (weak-condition half buffer) pipeline stage of a QDI 4-rail link.
//
// Every rail passes through a Muller C-element whose second input is the
// acknowledge of the next stage (ack_n_out, high = next stage empty): a rail
// rises when the previous stage raises it and the next stage is empty, and
// falls when the previous stage has returned to zero and the next stage has
// taken the word. A completion C-element over all digits (set when each
// digit has a rail high, reset when all rails are low) drives the inverted
// acknowledge back to the previous stage (ack_n_in).
//
// Each C-element is modelled as a flip-flop that holds its value while its
// inputs disagree, one clock per handshake phase; this is the way the
// asynchronous logic is modelled for timing analysis, with the clock
// standing in for the handshake phase. The stage structure follows the
// pipelined-link figure (a C-element per rail, inverting completion gate).
module qdi_wchb_stage #(
  parameter int unsigned NDIG = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NDIG-1:0][3:0]  rails_in,
  output logic                  ack_n_in,
  output logic [NDIG-1:0][3:0]  rails_out,
  input  logic                  ack_n_out
);
  logic comp;
  logic all_valid, all_empty;

  always_comb begin
    all_valid = 1'b1;
    all_empty = 1'b1;
    for (int d = 0; d < int'(NDIG); d++) begin
      all_valid = all_valid && (rails_out[d] != 4'b0000);
      all_empty = all_empty && (rails_out[d] == 4'b0000);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rails_out <= '0;
      comp      <= 1'b0;
    end else begin
      for (int d = 0; d < int'(NDIG); d++)
        for (int r = 0; r < 4; r++)
          if (rails_in[d][r] == ack_n_out) rails_out[d][r] <= ack_n_out;
      if (all_valid)      comp <= 1'b1;
      else if (all_empty) comp <= 1'b0;
    end
  end

  assign ack_n_in = !comp;
endmodule
