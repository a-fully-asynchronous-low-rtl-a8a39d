// Sender side of a QDI 4-phase, 4-rail (1-of-4) channel.
//
// Converts a clocked valid/ready transfer into the return-to-zero protocol:
// each 2-bit digit of 'data' is sent as one of four rails raised (digit value
// d raises rail d). Phase 1: the rails carry the code word. Phase 2: the
// receiver lowers its acknowledge (ack_n, high = ready for a new word).
// Phase 3: the rails return to all-zero. Phase 4: ack_n rises again, and the
// next word may go. 'ready' is high only in the idle state with ack_n high.
// The code and the four phases are those of the NoC link protocol; the
// clocked sender state machine is this design's own.
module qdi_tx #(
  parameter int unsigned NDIG = 18          // digits, 2 bits each
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid,
  output logic                  ready,
  input  logic [2*NDIG-1:0]     data,
  output logic [NDIG-1:0][3:0]  rails,
  input  logic                  ack_n
);
  typedef enum logic [1:0] {TX_IDLE, TX_DATA, TX_RTZ} tx_e;
  tx_e state;

  assign ready = (state == TX_IDLE) && ack_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TX_IDLE;
      rails <= '0;
    end else begin
      unique case (state)
        TX_IDLE: if (valid && ack_n) begin
          for (int d = 0; d < int'(NDIG); d++) rails[d] <= 4'b0001 << data[2*d +: 2];
          state <= TX_DATA;
        end
        TX_DATA: if (!ack_n) begin
          rails <= '0;
          state <= TX_RTZ;
        end
        TX_RTZ: if (ack_n) state <= TX_IDLE;
        default: state <= TX_IDLE;
      endcase
    end
  end
endmodule
