// Adaptive linear predictor (the two-tap FIR stage of the compensator).
//
// From the two most recent error samples it extrapolates the error at the
// next sampling instant and adds a self-training correction:
//
//   e_hat[n+1] = 2 e[n] - e[n-1] + sign(de[n]) * (min(|de[n]|, L[n]) >> k)
//   de[n]      = e[n] - e_hat[n]          (error of the previous prediction)
//   L[n]       = min(DE_MAX, |e[n]|)       (upper bound on the magnitude)
//
// The shift k comes from binning the raw |de[n]|: k = 2 below TH_K3, k = 3
// from TH_K3, k = 4 from TH_K4. Large estimation errors, which occur during
// big transients, thus get the gentlest slope correction, which keeps the
// loop gain bounded; each bin starts where its shift still leaves a term of
// at least one whole LSB. When |de[n]| < EPS (steady state) or
// adapt_en is low the correction is zero and the stage is the fixed
// extrapolator 2 - z^-1. Because k >= 2 and the magnitude never exceeds
// |e[n]|, the effective first tap a0 stays within 1.75 .. 2.25.
//
// The extrapolation, the correction term, its zeroing below a threshold, the
// binning into shift values and the bound |de| <= |e[n]| are the design's.
// The sign rule (follow the sign of de), the direction and edges of the bins,
// the threshold, the extra DE_MAX bound and all widths are this
// implementation's choices.
//
// Number format: e is an E_W-bit signed integer in ADC LSBs. e_hat and corr
// carry FRAC fractional bits (EH_W = E_W + 2 + FRAC bits signed, enough for
// the worst case 2e - e1 + corr), so that the correction, a small fraction
// of an error that is itself only a few LSBs in steady regulation, is not
// truncated away; de is formed at the same resolution. Thresholds and bounds
// are given in whole LSBs.
//
// Timing: one result per e_valid; e_hat, corr and evt are registered and
// eh_valid pulses one clock after e_valid.
module adaptive_predictor #(
  parameter int unsigned E_W    = buck_ctrl_pkg::E_W,
  parameter int unsigned FRAC   = buck_ctrl_pkg::PRED_FRAC,
  parameter int unsigned EH_W   = E_W + 2 + FRAC,
  parameter int unsigned EPS    = buck_ctrl_pkg::PRED_EPS,
  parameter int unsigned TH_K3  = buck_ctrl_pkg::PRED_TH_K3,
  parameter int unsigned TH_K4  = buck_ctrl_pkg::PRED_TH_K4,
  parameter int unsigned DE_MAX = buck_ctrl_pkg::PRED_DE_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   adapt_en,
  input  logic                   e_valid,
  input  logic signed [E_W-1:0]  e,
  output logic                   eh_valid,
  output logic signed [EH_W-1:0] e_hat,
  output logic signed [EH_W-1:0] corr,
  output buck_ctrl_pkg::pred_evt_t evt
);

  localparam int unsigned DW = EH_W + 1;   // width of de

  logic signed [E_W-1:0]  e1;        // e[n-1]
  logic signed [EH_W-1:0] eh_prev;   // e_hat[n], the prediction for this sample
  logic signed [DW-1:0]   e_q;       // e[n] with FRAC fraction bits

  logic signed [DW-1:0]   de;
  logic        [DW-1:0]   de_mag;
  logic        [DW-1:0]   e_mag;
  logic        [DW-1:0]   lim;
  logic        [DW-1:0]   mag_c;
  logic        [DW-1:0]   mag_s;
  logic        [2:0]      k;
  logic                   active;
  logic signed [EH_W-1:0] corr_n;
  logic signed [EH_W-1:0] eh_n;
  buck_ctrl_pkg::pred_evt_t evt_n;

  always_comb begin
    e_q    = DW'(e) <<< FRAC;
    de     = e_q - DW'(eh_prev);
    de_mag = de[DW-1] ? DW'(-de) : DW'(de);
    e_mag  = e_q[DW-1] ? DW'(-e_q) : DW'(e_q);
    lim    = (e_mag < (DW'(DE_MAX) << FRAC)) ? e_mag : (DW'(DE_MAX) << FRAC);
    mag_c  = (de_mag > lim) ? lim : de_mag;

    if (de_mag >= (DW'(TH_K4) << FRAC))      k = 3'd4;
    else if (de_mag >= (DW'(TH_K3) << FRAC)) k = 3'd3;
    else                                     k = 3'd2;

    active = adapt_en && (de_mag >= (DW'(EPS) << FRAC));
    mag_s  = mag_c >> k;

    if (!active)      corr_n = '0;
    else if (de[DW-1]) corr_n = -EH_W'(mag_s);
    else              corr_n = EH_W'(mag_s);

    eh_n = ((EH_W'(2 * EH_W'(e)) - EH_W'(e1)) <<< FRAC) + corr_n;

    evt_n.adapted = active && (mag_s != '0);
    evt_n.zeroed  = adapt_en && !active;
    evt_n.clipped = active && (de_mag > lim);
    evt_n.k       = active ? k : 3'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1       <= '0;
      eh_prev  <= '0;
      e_hat    <= '0;
      corr     <= '0;
      evt      <= '0;
      eh_valid <= 1'b0;
    end else begin
      eh_valid <= e_valid;
      if (e_valid) begin
        e1      <= e;
        eh_prev <= eh_n;
        e_hat   <= eh_n;
        corr    <= corr_n;
        evt     <= evt_n;
      end
    end
  end

endmodule
