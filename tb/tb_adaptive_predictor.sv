// Self-checking testbench for adaptive_predictor.
//
// A reference model in integer arithmetic tracks e[n-1] and the previous
// prediction and computes, for every sample, with F = 4 fraction bits,
//   e_hat = (2e - e1) * 2^F + sign(de) * (min(|de|, (|e|, DE_MAX) * 2^F) >> k),
//   de    = e * 2^F - e_hat_prev,
// with k = 2/3/4 from the bins on |de| (k = 4 for the largest) and the term zeroed below EPS or when
// adaptation is off. The stimulus mixes slow ramps, steps and random jumps so
// that every bin, the zeroing, the bound and the fixed mode occur; each is
// counted and must occur. It also checks that the effective first tap
// a0 = (e_hat + e1) / e stays within 1.75 .. 2.25, and the one-clock latency.
module tb_adaptive_predictor;
  localparam int E_W = 9, F = 4, EH_W = 15;
  localparam int EPS = 2, TH_K3 = 16, TH_K4 = 32, DE_MAX = 64;

  logic clk = 1'b0, rst_n = 1'b0, adapt_en = 1'b1, e_valid = 1'b0;
  logic signed [E_W-1:0]  e = '0;
  logic                   eh_valid;
  logic signed [EH_W-1:0] e_hat, corr;
  buck_ctrl_pkg::pred_evt_t evt;
  int checks = 0, failures = 0;
  int n_k2 = 0, n_k3 = 0, n_k4 = 0, n_zero = 0, n_clip = 0, n_fixed = 0;

  adaptive_predictor #(.E_W(E_W), .FRAC(F), .EH_W(EH_W), .EPS(EPS), .TH_K3(TH_K3),
                       .TH_K4(TH_K4), .DE_MAX(DE_MAX)) dut (.*);

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

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  int m_e1 = 0, m_prev = 0;

  task automatic step(input int ev, input bit aen);
    int de, mag, lim, kk, t, exp_hat;
    bit active;
    de  = ev * (1 << F) - m_prev;
    mag = iabs(de);
    lim = iabs(ev);
    if (lim > DE_MAX) lim = DE_MAX;
    lim = lim * (1 << F);
    kk  = (mag >= TH_K4 * (1 << F)) ? 4 : (mag >= TH_K3 * (1 << F)) ? 3 : 2;
    active = aen && (mag >= EPS * (1 << F));
    t = 0;
    if (active) begin
      t = ((mag > lim) ? lim : mag) >>> kk;
      if (de < 0) t = -t;
    end
    exp_hat = (2 * ev - m_e1) * (1 << F) + t;

    @(negedge clk);
    e = E_W'(ev); adapt_en = aen; e_valid = 1'b1;
    @(negedge clk);
    e_valid = 1'b0;
    check(eh_valid, "eh_valid one clock after e_valid");
    check(int'(e_hat) == exp_hat,
          $sformatf("e=%0d e1=%0d prev=%0d: e_hat=%0d expected %0d", ev, m_e1, m_prev, e_hat, exp_hat));
    check(int'(corr) == t, $sformatf("corr=%0d expected %0d", corr, t));
    if (active) check((t != 0) == evt.adapted, "adapted flag");
    // a0 bound: |e_hat - (2e - e1)| <= |e| / 4
    check(4 * iabs(int'(e_hat) - (2 * ev - m_e1) * (1 << F)) <= iabs(ev) * (1 << F),
          "a0 outside 1.75 .. 2.25");
    check(evt.zeroed == (aen && !active), "zeroed flag");
    if (active) begin
      check(int'(evt.k) == kk, "k flag");
      if (kk == 2) n_k2++;
      if (kk == 3) n_k3++;
      if (kk == 4) n_k4++;
      if (mag > lim) n_clip++;
      check(evt.clipped == (mag > lim), "clipped flag");
    end
    if (aen && !active) n_zero++;
    if (!aen) n_fixed++;
    m_e1 = ev; m_prev = exp_hat;
  endtask

  initial begin
    int ev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // steady state: constant error -> zero correction
    for (int i = 0; i < 20; i++) step(5, 1'b1);
    // a slow ramp, a fast ramp and a step (load-transient like)
    for (int i = 0; i < 30; i++) step(i, 1'b1);
    for (int i = 0; i < 15; i++) step(30 + 9 * i, 1'b1);
    for (int i = 0; i < 10; i++) step(-60, 1'b1);
    // decaying oscillation
    for (int i = 0; i < 60; i++) step(int'(80.0 * $cos(0.5 * i) * $exp(-0.05 * i)), 1'b1);
    // random, both modes
    ev = 0;
    for (int i = 0; i < 3000; i++) begin
      ev += int'($urandom_range(0, 40)) - 20;
      if (($urandom & 31) == 0) ev = int'($urandom_range(0, 400)) - 200;
      if (ev > 250) ev = 250;
      if (ev < -250) ev = -250;
      step(ev, ($urandom_range(0, 7) != 0));
    end
    $display("k=2:%0d k=3:%0d k=4:%0d zeroed:%0d clipped:%0d fixed:%0d",
             n_k2, n_k3, n_k4, n_zero, n_clip, n_fixed);
    check(n_k2 > 0, "k=2 bin never used");
    check(n_k3 > 0, "k=3 bin never used");
    check(n_k4 > 0, "k=4 bin never used");
    check(n_zero > 0, "correction never zeroed");
    check(n_clip > 0, "bound never applied");
    check(n_fixed > 0, "fixed mode never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
