// Receiver side of a QDI 4-phase, 4-rail (1-of-4) channel.
//
// Detects completion of a code word (every digit has exactly one rail
// high), decodes it, and pulses 'valid' for one clock with the decoded
// 'data'. It then lowers ack_n and raises it again once all rails have
// returned to zero. The receiver never stalls: the credit-based flow control
// of the NoC guarantees room for every flit that is sent.
// Completion detection follows QDI practice (OR per digit, then all digits);
// modelling it with clocked state is this design's choice.
module qdi_rx #(
  parameter int unsigned NDIG = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NDIG-1:0][3:0]  rails,
  output logic                  ack_n,
  output logic                  valid,
  output logic [2*NDIG-1:0]     data
);
  logic all_valid, all_empty;

  always_comb begin
    all_valid = 1'b1;
    all_empty = 1'b1;
    data      = '0;
    for (int d = 0; d < int'(NDIG); d++) begin
      all_valid = all_valid && (rails[d] != 4'b0000);
      all_empty = all_empty && (rails[d] == 4'b0000);
      unique case (rails[d])
        4'b0010: data[2*d +: 2] = 2'd1;
        4'b0100: data[2*d +: 2] = 2'd2;
        4'b1000: data[2*d +: 2] = 2'd3;
        default: data[2*d +: 2] = 2'd0;
      endcase
    end
  end

  assign valid = all_valid && ack_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          ack_n <= 1'b1;
    else if (all_valid)  ack_n <= 1'b0;
    else if (all_empty)  ack_n <= 1'b1;
  end
endmodule
