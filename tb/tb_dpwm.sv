// Self-checking testbench for dpwm.
//
// Checks the time base (PWM_PERIOD cycles between period starts, a sampling
// strobe every PWM_PERIOD/OSR cycles, aligned with the period start), that
// the pulse is a single run of exactly `duty` cycles starting at the period
// start for constant duties including 0 and 100 %, that an over-range duty is
// clamped, and the mid-period update rules worked out by hand:
//   * a smaller duty loaded at the mid-period strobe (t = 128) after the
//     compare point has passed ends the pulse two cycles later (130 cycles);
//   * a larger duty loaded after the pulse has ended does not restart it;
//   * a larger duty loaded while the pulse is still high stretches it.
module tb_dpwm;
  localparam int P = 256, OSR = 2, DB = 9;

  logic clk = 1'b0, rst_n = 1'b0, duty_valid = 1'b0;
  logic [DB-1:0] duty = '0;
  logic pwm, sample_strobe, period_start;
  logic [DB-1:0] duty_held;
  int checks = 0, failures = 0;

  dpwm #(.PWM_PERIOD(P), .OSR(OSR), .DUTY_BITS(DB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Load a duty value with a one-cycle duty_valid pulse (from a negedge).
  task automatic load(input int d);
    duty = DB'(d); duty_valid = 1'b1;
    @(negedge clk);
    duty_valid = 1'b0;
  endtask

  // Observe one period from its start: count high cycles and the number of
  // rising edges, and load `mid_duty` at the mid-period strobe if >= 0.
  task automatic period(input int mid_duty, output int high, output int rises);
    bit prev;
    high = 0; rises = 0; prev = 1'b0;
    while (!period_start) @(negedge clk);
    for (int t = 0; t < P; t++) begin
      check(period_start == (t == 0), $sformatf("period_start at t=%0d", t));
      check(sample_strobe == ((t % (P / OSR)) == 0), $sformatf("sample_strobe at t=%0d", t));
      if (pwm) high++;
      if (pwm && !prev) rises++;   // a pulse high at t = 0 counts as one
      prev = pwm;
      if (t == P / OSR && mid_duty >= 0) begin
        check(sample_strobe, "strobe at mid-period");
        duty = DB'(mid_duty); duty_valid = 1'b1;
        @(negedge clk);
        duty_valid = 1'b0;
        continue;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int high, rises;
    automatic int dv[8] = '{0, 1, 37, 128, 200, 255, 256, 300};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // constant duties
    foreach (dv[i]) begin
      load(dv[i]);
      check(int'(duty_held) == ((dv[i] > P) ? P : dv[i]), "duty_held after load");
      period(-1, high, rises);   // may start mid-way through a period: discard
      period(-1, high, rises);
      check(high == ((dv[i] > P) ? P : dv[i]),
            $sformatf("duty %0d: %0d high cycles", dv[i], high));
      check(rises == ((dv[i] == 0) ? 0 : 1), $sformatf("duty %0d: %0d rising edges", dv[i], rises));
    end
    // mid-period updates
    load(200); period(-1, high, rises);
    period(100, high, rises);
    check(high == 130, $sformatf("200 -> 100 at mid: %0d high cycles", high));
    load(100); period(-1, high, rises);
    period(200, high, rises);
    check(high == 100 && rises == 1, $sformatf("100 -> 200 at mid: %0d high cycles, %0d rises", high, rises));
    period(-1, high, rises);
    check(high == 200, "200 holds in the following period");
    load(150); period(-1, high, rises);
    period(180, high, rises);
    check(high == 180, $sformatf("150 -> 180 at mid: %0d high cycles", high));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
