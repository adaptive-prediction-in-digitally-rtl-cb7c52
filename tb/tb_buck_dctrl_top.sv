// End-to-end, closed-loop testbench for buck_dctrl_top at its default
// parameters (256 clocks per 1 MHz switching period, two samples per period).
//
// The controller regulates the behavioural plant of buck_plant_model to a
// reference of 147 ADC codes (a duty of about 0.6, as for 1.8 V from 3 V).
// The run covers start-up from zero duty, then
// for adaptive and for fixed linear extrapolation a load step up and a load
// step down (a disturbance of 30 duty counts). It checks:
//   * the sampling strobe every 128 clocks (2 MHz) and the controller latency
//     (the DPWM holds a new duty exactly 4 clocks after adc_valid, and at no
//     other time);
//   * each PWM period's pulse width equals the held duty when the duty did
//     not change during that period;
//   * after start-up and after every load step the feedback settles within
//     2 % of the reference, within 60 samples (30 us) of a step, with zero
//     error and a duty near the plant's steady-state value;
//   * that every mechanism occurs at least once: the correction with k = 2,
//     3 and 4, the correction zeroed in steady state, the bound on |de|,
//     fixed mode, upper and lower duty saturation, both load steps and a
//     reference step of 20 codes up and back (settling within 100 samples).
// Settling times are printed in samples of 0.5 us.
module tb_buck_dctrl_top;
  localparam int P = 256, DB = 9, VREF = 147, DIST = 30;
  localparam real TOL = 0.02 * VREF;

  logic clk = 1'b0, rst_n = 1'b0, adapt_en = 1'b1;
  int   vref_i = VREF;
  logic [7:0] vref;
  assign vref = 8'(vref_i);
  logic adc_start, adc_valid, pwm, period_start, duty_sat_hi, duty_sat_lo;
  logic [7:0] adc_code;
  logic [DB-1:0] duty;
  logic signed [8:0] err;
  logic signed [14:0] err_pred, pred_corr;   // 4 fraction bits
  buck_ctrl_pkg::pred_evt_t pred_evt;
  int load_dist = 0;
  real vout;

  int checks = 0, failures = 0;
  int n_k2 = 0, n_k3 = 0, n_k4 = 0, n_zero = 0, n_clip = 0, n_fixed = 0;
  int n_ref_steps = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_step_up = 0, n_step_down = 0, n_pwm_checked = 0;
  longint cyc = 0, samples = 0;

  buck_dctrl_top dut (
    .clk, .rst_n, .adapt_en, .vref,
    .adc_start, .adc_valid, .adc_code,
    .pwm, .period_start, .duty, .err, .err_pred, .pred_corr, .pred_evt,
    .duty_sat_hi, .duty_sat_lo
  );

  buck_plant_model #(.ADC_BITS(8), .DUTY_BITS(DB), .CONV_CYCLES(20)) plant (
    .clk, .rst_n, .adc_start, .duty_held(duty), .load_dist,
    .adc_valid, .adc_code, .vout
  );

  always #2 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---- per-cycle monitors --------------------------------------------------
  longint last_strobe = -1;
  logic [4:0] valid_sr = '0;
  logic [DB-1:0] duty_q = '0;
  int  high_cnt = 0;
  bit  duty_changed = 1'b0, first_period = 1'b1;
  logic [DB-1:0] duty_at_start = '0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    // sampling rate
    if (adc_start) begin
      if (last_strobe >= 0) check(cyc - last_strobe == longint'(P) / longint'(2), "sampling interval is not 128 clocks");
      last_strobe = cyc;
    end
    // latency: the held duty changes only 4 clocks after adc_valid
    valid_sr = {valid_sr[3:0], adc_valid};
    if (duty != duty_q) check(valid_sr[4], "duty changed other than 4 clocks after adc_valid");
    // PWM pulse width per period
    if (period_start) begin
      if (!first_period && !duty_changed) begin
        check(high_cnt == int'(duty_at_start),
              $sformatf("pwm high %0d cycles, duty %0d", high_cnt, duty_at_start));
        n_pwm_checked++;
      end
      first_period = 1'b0;
      high_cnt = 0;
      duty_changed = 1'b0;
      duty_at_start = duty;
    end else if (duty != duty_q) duty_changed = 1'b1;
    if (pwm) high_cnt++;
    duty_q = duty;
  end

  // adc_valid delayed by whole clocks: av_d[1] marks the cycle in which the
  // prediction is new, av_d[2] the cycle in which the IIR's duty is new
  logic [2:0] av_d = '0;
  always @(posedge clk) av_d <= {av_d[1:0], adc_valid};

  // one record per controller step
  always @(negedge clk) if (rst_n && av_d[1]) begin
    samples++;
    if (!adapt_en) n_fixed++;
    else begin
      if (pred_evt.adapted && pred_evt.k == 3'd2) n_k2++;
      if (pred_evt.adapted && pred_evt.k == 3'd3) n_k3++;
      if (pred_evt.adapted && pred_evt.k == 3'd4) n_k4++;
      if (pred_evt.zeroed) n_zero++;
      if (pred_evt.clipped) n_clip++;
    end
  end
  always @(negedge clk) if (rst_n && av_d[2]) begin
    if (duty_sat_hi) n_sat_hi++;
    if (duty_sat_lo) n_sat_lo++;
  end

  // ---- settling measurement -------------------------------------------------
  // Runs `n` samples and returns the number of samples after the start until
  // the feedback last left the 2 % band.
  task automatic run_samples(input int n, output int settle, output real vmin, output real vmax);
    settle = 0; vmin = 1.0e9; vmax = -1.0e9;
    for (int i = 0; i < n; i++) begin
      @(posedge adc_valid);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
      if (vout > vref_i + TOL || vout < vref_i - TOL) settle = i + 1;
    end
  endtask

  task automatic check_steady(input string what);
    real d_ss;
    @(negedge clk);
    check(vout > vref_i - TOL && vout < vref_i + TOL, $sformatf("%s: vout %f outside 2 %% band", what, vout));
    @(posedge adc_valid); repeat (2) @(negedge clk);
    check(err == 0, $sformatf("%s: steady error %0d", what, err));
    // plant dc gain 0.010957 / 0.0115 = 0.9528 LSB per count
    d_ss = vref_i / 0.9528 + load_dist;
    check(real'(duty) > d_ss - 3.0 && real'(duty) < d_ss + 3.0,
          $sformatf("%s: steady duty %0d, expected about %f", what, duty, d_ss));
  endtask

  int st_up[2], st_dn[2];

  initial begin
    int settle;
    real vmin, vmax;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // start-up
    run_samples(400, settle, vmin, vmax);
    $display("start-up: settled after %0d samples, peak %f", settle, vmax);
    check(settle < 400, "start-up did not settle");
    check_steady("start-up");

    for (int m = 0; m < 2; m++) begin
      adapt_en = (m == 0);
      run_samples(100, settle, vmin, vmax);
      check_steady(m == 0 ? "adaptive, before step" : "fixed, before step");
      // load step up
      @(negedge clk); load_dist = DIST; n_step_up++;
      run_samples(200, settle, vmin, vmax);
      st_up[m] = settle;
      $display("%s: load step up settles in %0d samples (%0.1f us), dip to %f",
               m == 0 ? "adaptive" : "fixed", settle, settle * 0.5, vmin);
      check(vmin < VREF - TOL, "load step up caused no visible dip");
      check(settle > 0 && settle <= 60, "load step up settling too slow");
      check_steady("after step up");
      // load step down
      @(negedge clk); load_dist = 0; n_step_down++;
      run_samples(200, settle, vmin, vmax);
      st_dn[m] = settle;
      $display("%s: load step down settles in %0d samples (%0.1f us), peak %f",
               m == 0 ? "adaptive" : "fixed", settle, settle * 0.5, vmax);
      check(vmax > VREF + TOL, "load step down caused no visible peak");
      check(settle > 0 && settle <= 60, "load step down settling too slow");
      check_steady("after step down");
    end

    // reference step up and back (adaptive mode)
    adapt_en = 1'b1;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk); vref_i = (r == 0) ? VREF + 20 : VREF; n_ref_steps++;
      run_samples(200, settle, vmin, vmax);
      $display("reference step to %0d settles in %0d samples", vref_i, settle);
      check(settle > 0 && settle <= 100, "reference step settling too slow");
      check_steady("after reference step");
    end

    $display("events: k2=%0d k3=%0d k4=%0d zeroed=%0d clipped=%0d fixed=%0d sat_hi=%0d sat_lo=%0d steps=%0d/%0d pwm_periods=%0d samples=%0d",
             n_k2, n_k3, n_k4, n_zero, n_clip, n_fixed, n_sat_hi, n_sat_lo,
             n_step_up, n_step_down, n_pwm_checked, samples);
    check(n_k2 > 0, "correction with k = 2 never happened");
    check(n_k3 > 0, "correction with k = 3 never happened");
    check(n_k4 > 0, "correction with k = 4 never happened");
    check(n_zero > 0, "correction never zeroed");
    check(n_clip > 0, "bound on |de| never applied");
    check(n_fixed > 0, "fixed extrapolation never used");
    check(n_sat_hi > 0, "duty never saturated high");
    check(n_sat_lo > 0, "duty never saturated low");
    check(n_step_up > 0 && n_step_down > 0, "load steps missing");
    check(n_ref_steps == 2, "reference steps missing");
    check(n_pwm_checked > 100, "too few PWM periods checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
