// Counter-based digital pulse-width modulator with ADC sampling strobes.
//
// A free-running counter divides the system clock into switching periods of
// PWM_PERIOD cycles. The PWM output rises at the start of a period (if the
// duty is non-zero) and falls when the counter reaches the held duty value
// (trailing-edge modulation), so it is high for exactly `duty` cycles. The
// falling edge is final for the period: a later, larger duty cannot turn the
// output back on before the next period begins.
//
// The DPWM is the hold device of the loop: a new duty command is taken as
// soon as duty_valid pulses, not only at period boundaries, so that with two
// samples per period the duty is refreshed at the sampling rate. This matches
// the loop model sampled and held at Tsam = 0.5 us; an earlier load of the
// compare value is the only difference from a once-per-period update.
//
// sample_strobe pulses once every PWM_PERIOD/OSR cycles, in the same cycle as
// the rising edge at each period start and at mid-period, and asks the ADC
// for a conversion. period_start marks the first cycle of each period.
//
// The modulator function and the 1 MHz / 2 MHz rates are the design's; the
// counter clock, resolution, edge type and update rule are this
// implementation's choices. All outputs are registered. An assertion checks
// that the held duty stays within one period; it samples rst_n on the clock
// for its disable condition, which lint reports as a reset used both
// synchronously and asynchronously. That use is intended.
module dpwm #(
  parameter int unsigned PWM_PERIOD = buck_ctrl_pkg::PWM_PERIOD,
  parameter int unsigned OSR        = buck_ctrl_pkg::OSR,
  parameter int unsigned DUTY_BITS  = $clog2(PWM_PERIOD) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 duty_valid,
  input  logic [DUTY_BITS-1:0] duty,
  output logic                 pwm,
  output logic                 sample_strobe,
  output logic                 period_start,
  output logic [DUTY_BITS-1:0] duty_held
);

  localparam int unsigned CW       = $clog2(PWM_PERIOD);
  localparam int unsigned SAMP_DIV = PWM_PERIOD / OSR;

  logic [CW-1:0]        cnt;
  logic [DUTY_BITS-1:0] duty_lim;

  always_comb duty_lim = (duty > DUTY_BITS'(PWM_PERIOD)) ? DUTY_BITS'(PWM_PERIOD) : duty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt           <= '0;
      duty_held     <= '0;
      pwm           <= 1'b0;
      sample_strobe <= 1'b0;
      period_start  <= 1'b0;
    end else begin
      cnt           <= (cnt == CW'(PWM_PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (duty_valid) duty_held <= duty_lim;
      if (cnt == '0) pwm <= (duty_held != '0);
      else           pwm <= pwm && (DUTY_BITS'(cnt) < duty_held);
      sample_strobe <= (32'(cnt) % SAMP_DIV) == 0;
      period_start  <= (cnt == '0);
    end
  end

  // the held duty never exceeds a full period
  a_duty_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 duty_held <= DUTY_BITS'(PWM_PERIOD));

endmodule
