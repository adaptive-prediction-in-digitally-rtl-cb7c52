// Self-checking testbench for iir_comp.
//
// Two references run beside the filter:
//  * a bit-exact integer model of the Q10 direct-form-I recursion with the
//    same saturation and rounding, compared on every output;
//  * a floating-point model with the printed numerator 9.166, -16.69, 7.582
//    and the denominator 1 - (97/64) z^-1 + (33/64) z^-2 (the printed 1.516
//    and 0.5156), with the same clamping; the rounded duty must follow it
//    within 1 count plus 2 % (numerator quantization) over short runs.
// It also checks that a constant input integrates (the pole at z = 1), that
// both saturation limits are reached and flagged, and the one-clock latency.
module tb_iir_comp;
  localparam int X_W = 15, XF = 4, DB = 9, DMAX = 256, FRAC = 10;
  localparam int B0 = 9386, B1 = -17091, B2 = 7764, A1 = 1552, A2 = 528;

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [X_W-1:0] x = '0;
  logic d_valid, sat_hi, sat_lo;
  logic [DB-1:0] duty;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  iir_comp #(.X_W(X_W), .X_FRAC(XF), .DUTY_BITS(DB), .DUTY_MAX(DMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // integer model state
  longint mx1, mx2, my1, my2;
  // real model state
  real rx1, rx2, ry1, ry2;

  task automatic reset_models();
    mx1 = 0; mx2 = 0; my1 = 0; my2 = 0;
    rx1 = 0; rx2 = 0; ry1 = 0; ry2 = 0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    reset_models();
  endtask

  // xv is the input in LSBs with XF fraction bits
  task automatic step(input int xv, input bit check_real);
    longint acc, fb, yn, yr, ymax;
    real racc;
    int exp_d;
    ymax = longint'(DMAX) << FRAC;
    fb  = (A1 * my1 - A2 * my2) >>> FRAC;
    acc = ((B0 * longint'(xv) + B1 * mx1 + B2 * mx2) >>> XF) + fb;
    yn  = (acc > ymax) ? ymax : (acc < 0) ? 0 : acc;
    yr  = (yn + (1 << (FRAC - 1))) >>> FRAC;
    exp_d = int'((yr > longint'(DMAX)) ? longint'(DMAX) : yr);

    racc = (9.166 * xv - 16.69 * rx1 + 7.582 * rx2) / 16.0 + (97.0 / 64.0) * ry1 - (33.0 / 64.0) * ry2;
    if (racc > DMAX) racc = DMAX;
    if (racc < 0.0) racc = 0.0;

    @(negedge clk);
    x = X_W'(xv); x_valid = 1'b1;
    @(negedge clk);
    x_valid = 1'b0;
    check(d_valid, "d_valid one clock after x_valid");
    check(int'(duty) == exp_d, $sformatf("duty=%0d expected %0d (x=%0d)", duty, exp_d, xv));
    check(sat_hi == (acc > ymax), "sat_hi flag");
    check(sat_lo == (acc < 0), "sat_lo flag");
    if (check_real)
      check((real'(duty) - racc <= 1.0 + 0.02 * racc) && (racc - real'(duty) <= 1.0 + 0.02 * racc),
            $sformatf("duty=%0d, floating-point model %f", duty, racc));
    if (acc > ymax) n_hi++;
    if (acc < 0) n_lo++;
    mx2 = mx1; mx1 = longint'(xv); my2 = my1; my1 = yn;
    rx2 = rx1; rx1 = xv; ry2 = ry1; ry1 = racc;
    @(negedge clk);
    check(!d_valid, "d_valid is a single pulse");
  endtask

  initial begin
    int d_before;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    reset_models();
    // constant error: after the transient of the zeros the output keeps
    // rising by about 0.058 * x / (1 - 33/64) counts per sample (integrator)
    for (int i = 0; i < 60; i++) begin
      if (i == 10) d_before = int'(duty);
      step(4 * 16, 1'b1);
      if (i > 10) check(int'(duty) >= d_before, "constant input does not integrate");
    end
    check(int'(duty) - d_before >= 15, $sformatf("integrator too slow: %0d -> %0d", d_before, duty));
    // smooth positive inputs compared with the floating-point model
    do_reset();
    for (int i = 0; i < 30; i++) step(48 + 5 * (i % 4), 1'b1);
    // sustained positive error: upper limit
    for (int i = 0; i < 80; i++) step(100 * 16, 1'b0);
    check(int'(duty) == DMAX, "duty not held at upper limit");
    // sustained negative error: lower limit
    for (int i = 0; i < 80; i++) step(-100 * 16, 1'b0);
    check(int'(duty) == 0, "duty not held at zero");
    // random
    do_reset();
    for (int i = 0; i < 3000; i++) step(int'($urandom_range(0, 1920)) - 960, 1'b0);
    $display("saturated high %0d, low %0d", n_hi, n_lo);
    check(n_hi > 0 && n_lo > 0, "both saturation limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
