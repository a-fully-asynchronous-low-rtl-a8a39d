// Behavioural model of the GALS interface clock generator (not synthesizable
// logic: the real part is a ring oscillator built from a standard-cell delay
// line, whose period is set by analog delays).
//
// Produces clk_out with period (BASE_PS + code*STEP_PS) * 2^scale picoseconds:
// with the default values the delay code spans 1.0 ns to 2.5 ns, i.e. the
// 1 GHz to 400 MHz range, and the scaling factor divides it further by 1, 2,
// 4 or 8. Each period starts with its low half; the setting is sampled at
// that falling edge and holds for the whole period, so a change never
// produces a short pulse. The oscillator runs freely, also during reset
// (so the logic it clocks can be reset); while rst_n is low it runs at the
// slowest setting of the base range, 2.5 ns.
// The range follows the interface description; the step size, the 4-bit code
// and the power-of-two scaling are this design's assumptions.
module clock_gen #(
  parameter int unsigned BASE_PS = 1000,
  parameter int unsigned STEP_PS = 100
) (
  input  logic       rst_n,
  input  logic [3:0] code,
  input  logic [1:0] scale,
  output logic       clk_out
);

  timeunit 1ps;
  timeprecision 1ps;

  int unsigned period_ps;

  always begin
    if (!rst_n) period_ps = BASE_PS + 15 * STEP_PS;
    else        period_ps = (BASE_PS + int'(code) * STEP_PS) << scale;
    clk_out = 1'b0;
    #(period_ps / 2);
    clk_out = 1'b1;
    #(period_ps - period_ps / 2);
  end
endmodule
