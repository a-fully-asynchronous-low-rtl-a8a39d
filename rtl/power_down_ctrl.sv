// Automatic power-down controller of a router.
//
// Watches the router's activity (a flit arriving on any input, or any flit
// still held inside) and, after IDLE_CYCLES consecutive idle cycles, moves the
// router to its power-down mode, in which the supply is lowered and the
// router keeps working at a reduced rate. The reduced rate is modelled by
// the enable 'en', high only one cycle in SLOW_DIV: the power-down flit cycle
// time is four times the nominal one (7.2 ns against 1.8 ns), hence
// SLOW_DIV = 4. On new activity the controller starts a wake-up of
// WAKE_CYCLES cycles, still at the reduced rate, and then returns to full
// rate.
//
// That the router is slowed rather than stopped, and the factor 4, follow the
// published figures for the power-down mode. The activity detector, the idle
// threshold, the wake-up time and the three-state controller are this
// design's own choices.
module power_down_ctrl #(
  parameter int unsigned IDLE_CYCLES = 16,
  parameter int unsigned WAKE_CYCLES = 4,
  parameter int unsigned SLOW_DIV    = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic activity,
  output logic low_power,   // 1 while supply is lowered (power-down or waking)
  output logic en           // full-rate: always 1; low power: 1 in SLOW_DIV
);
  typedef enum logic [1:0] {PWR_ON, PWR_DOWN, PWR_WAKE} pstate_e;
  pstate_e state;

  localparam int unsigned TW = $clog2(((IDLE_CYCLES > WAKE_CYCLES) ? IDLE_CYCLES : WAKE_CYCLES) + 1);
  localparam int unsigned DW = (SLOW_DIV > 1) ? $clog2(SLOW_DIV) : 1;
  logic [TW-1:0] timer;
  logic [DW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PWR_ON;
      timer <= '0;
      phase <= '0;
    end else begin
      phase <= (phase == DW'(SLOW_DIV-1)) ? '0 : phase + 1'b1;
      unique case (state)
        PWR_ON: begin
          if (activity) timer <= '0;
          else if (timer == TW'(IDLE_CYCLES-1)) begin
            state <= PWR_DOWN;
            timer <= '0;
          end else timer <= timer + 1'b1;
        end
        PWR_DOWN: begin
          if (activity) begin
            state <= PWR_WAKE;
            timer <= '0;
          end
        end
        PWR_WAKE: begin
          if (timer == TW'(WAKE_CYCLES-1)) begin
            state <= PWR_ON;
            timer <= '0;
          end else timer <= timer + 1'b1;
        end
        default: state <= PWR_ON;
      endcase
    end
  end

  assign low_power = (state != PWR_ON);
  assign en        = !low_power || (phase == '0);
endmodule
