// Delay-line programming register of the GALS interface clock generator.
//
// The IP, clocked by the generated clock itself, writes a new delay code
// and scaling factor with cfg_we. The value is first captured in a staging
// register and copied to the active setting (code, scale) at the next edge,
// so the oscillator only ever sees a setting that has been stable for a full
// cycle; the new frequency is in force from the third edge after the write
// (the programming takes less than three cycles). 'busy' is high while an
// update is in progress. Reset loads the slowest setting of the base range.
// The two-register update and the reset value are this design's choices.
module delay_line_prog #(
  parameter int unsigned CODE_W     = 4,
  parameter logic [CODE_W-1:0] RESET_CODE = '1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CODE_W-1:0] cfg_code,
  input  logic [1:0]        cfg_scale,
  output logic [CODE_W-1:0] code,
  output logic [1:0]        scale,
  output logic              busy
);
  logic [CODE_W-1:0] stage_code;
  logic [1:0]        stage_scale;
  logic              pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_code  <= RESET_CODE;
      stage_scale <= 2'd0;
      code        <= RESET_CODE;
      scale       <= 2'd0;
      pending     <= 1'b0;
    end else begin
      if (cfg_we) begin
        stage_code  <= cfg_code;
        stage_scale <= cfg_scale;
      end
      pending <= cfg_we;
      if (pending) begin
        code  <= stage_code;
        scale <= stage_scale;
      end
    end
  end
  assign busy = pending;
endmodule
