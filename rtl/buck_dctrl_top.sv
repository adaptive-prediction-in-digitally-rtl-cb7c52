// Digital controller of a voltage-mode synchronous buck converter with
// adaptive error prediction.
//
// The DPWM's counter sets the time base: it switches the power stage at
// 1 MHz and asks the external ADC for a sample of the divided output voltage
// twice per switching period (adc_start). When the ADC returns its code
// (adc_valid), the controller forms e[n] = Vref - Vfb, extrapolates the error
// one sample ahead with the adaptive two-tap predictor, passes the prediction
// through the second-order IIR compensator and hands the resulting duty to
// the DPWM, which applies it at once. Predicting e[n+1] cancels most of the
// delay between the sampling instant and the modulating edge; the predictor's
// self-training term adjusts the extrapolation slope during load transients
// and is zeroed in steady state.
//
// Chain and latency from adc_valid (all registered):
//   error_sub (+1) -> adaptive_predictor (+1) -> iir_comp (+1) -> dpwm (+1)
// so the DPWM holds a new duty four clocks after the clock edge that raised
// adc_valid, and the PWM output reflects it from the next comparison on.
//
// The block structure (error node, two-tap FIR predictor, three-tap IIR
// filter, DPWM, ADC) and the rates follow the design. The ADC, gate driver
// and power stage are outside this module: adc_start, adc_code/adc_valid and
// pwm are their connections. err_pred and pred_corr carry PRED_FRAC
// fractional bits. adapt_en selects between the adaptive and the
// fixed linear extrapolation; the observation outputs are this
// implementation's additions. Assertions check the ADC handshake: adc_valid
// is a one-clock pulse, and it only arrives while a conversion requested by
// adc_start is outstanding. They sample rst_n on the clock for their disable
// condition, which lint reports as a reset used both synchronously and
// asynchronously; that use is intended.
module buck_dctrl_top #(
  parameter int unsigned ADC_BITS   = buck_ctrl_pkg::ADC_BITS,
  parameter int unsigned PWM_PERIOD = buck_ctrl_pkg::PWM_PERIOD,
  parameter int unsigned OSR        = buck_ctrl_pkg::OSR,
  parameter int unsigned PRED_FRAC  = buck_ctrl_pkg::PRED_FRAC,
  parameter int unsigned DUTY_BITS  = $clog2(PWM_PERIOD) + 1,
  localparam int unsigned E_W       = ADC_BITS + 1,
  localparam int unsigned EH_W      = E_W + 2 + PRED_FRAC
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      adapt_en,
  input  logic [ADC_BITS-1:0]       vref,
  // ADC
  output logic                      adc_start,
  input  logic                      adc_valid,
  input  logic [ADC_BITS-1:0]       adc_code,
  // to the MOSFET gate driver
  output logic                      pwm,
  // observation
  output logic                      period_start,
  output logic [DUTY_BITS-1:0]      duty,
  output logic signed [ADC_BITS:0]  err,
  output logic signed [EH_W-1:0]    err_pred,
  output logic signed [EH_W-1:0]    pred_corr,
  output buck_ctrl_pkg::pred_evt_t  pred_evt,
  output logic                      duty_sat_hi,
  output logic                      duty_sat_lo
);


  logic                  e_valid, eh_valid, d_valid;
  logic [DUTY_BITS-1:0]  duty_cmd;

  error_sub #(.ADC_BITS(ADC_BITS)) u_err (
    .clk, .rst_n,
    .in_valid (adc_valid),
    .vref,
    .vfb      (adc_code),
    .e_valid,
    .e        (err)
  );

  adaptive_predictor #(.E_W(E_W), .FRAC(PRED_FRAC), .EH_W(EH_W)) u_pred (
    .clk, .rst_n,
    .adapt_en,
    .e_valid,
    .e        (err),
    .eh_valid,
    .e_hat    (err_pred),
    .corr     (pred_corr),
    .evt      (pred_evt)
  );

  iir_comp #(.X_W(EH_W), .X_FRAC(PRED_FRAC), .DUTY_BITS(DUTY_BITS), .DUTY_MAX(PWM_PERIOD)) u_iir (
    .clk, .rst_n,
    .x_valid (eh_valid),
    .x       (err_pred),
    .d_valid,
    .duty    (duty_cmd),
    .sat_hi  (duty_sat_hi),
    .sat_lo  (duty_sat_lo)
  );

  dpwm #(.PWM_PERIOD(PWM_PERIOD), .OSR(OSR), .DUTY_BITS(DUTY_BITS)) u_dpwm (
    .clk, .rst_n,
    .duty_valid    (d_valid),
    .duty          (duty_cmd),
    .pwm,
    .sample_strobe (adc_start),
    .period_start,
    .duty_held     (duty)
  );

  // ADC handshake: adc_valid is a single-cycle pulse and follows a request
  logic conv_pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         conv_pending <= 1'b0;
    else if (adc_start) conv_pending <= 1'b1;
    else if (adc_valid) conv_pending <= 1'b0;
  end
  a_adc_pulse:   assert property (@(posedge clk) disable iff (!rst_n) adc_valid |=> !adc_valid);
  a_adc_request: assert property (@(posedge clk) disable iff (!rst_n) adc_valid |-> conv_pending);

endmodule
