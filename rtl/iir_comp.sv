// Second-order (three-tap) IIR compensator of the digital controller.
//
// Implements, once per x_valid, the difference equation of
//
//   G_IIR(z) = (9.166 - 16.69 z^-1 + 7.582 z^-2) / (1 - 1.516 z^-1 + 0.5156 z^-2)
//
//   y[n] = B0 x[n] + B1 x[n-1] + B2 x[n-2] + A1 y[n-1] - A2 y[n-2]
//
// in direct form I. x is the predicted error in ADC LSBs with X_FRAC
// fractional bits; y is the duty command in DPWM counts, held internally with
// FRAC fractional bits. The feed-forward sum is brought from FRAC + X_FRAC to
// FRAC fractional bits by an arithmetic (flooring) shift. The
// denominator has a pole at z = 1, so the filter integrates: y itself is the
// duty ratio, not a deviation from it. y is saturated to 0 .. DUTY_MAX before
// it is stored, which also keeps the integrator from winding up while the
// duty is pinned at a limit. The duty output is y rounded to whole counts.
//
// The transfer function is the design's. The Q10 coefficient quantization,
// the exact binary fractions 97/64 and 33/64 for the denominator, the
// saturation and the reset of all state to zero are this implementation's.
//
// Timing: duty and d_valid are registered; d_valid pulses one clock after
// x_valid. All five products are formed in that one cycle.
module iir_comp #(
  parameter int unsigned X_W       = buck_ctrl_pkg::EH_W,
  parameter int unsigned X_FRAC    = buck_ctrl_pkg::PRED_FRAC,
  parameter int unsigned DUTY_BITS = buck_ctrl_pkg::DUTY_BITS,
  parameter int unsigned DUTY_MAX  = buck_ctrl_pkg::PWM_PERIOD,
  parameter int unsigned FRAC      = buck_ctrl_pkg::IIR_FRAC,
  parameter int          B0        = buck_ctrl_pkg::IIR_B0,
  parameter int          B1        = buck_ctrl_pkg::IIR_B1,
  parameter int          B2        = buck_ctrl_pkg::IIR_B2,
  parameter int          A1        = buck_ctrl_pkg::IIR_A1,
  parameter int          A2        = buck_ctrl_pkg::IIR_A2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  x_valid,
  input  logic signed [X_W-1:0] x,
  output logic                  d_valid,
  output logic [DUTY_BITS-1:0]  duty,
  output logic                  sat_hi,   // y was clipped at DUTY_MAX this step
  output logic                  sat_lo    // y was clipped at 0 this step
);

  localparam int unsigned AW = 48;
  localparam logic signed [AW-1:0] Y_MAX = AW'(DUTY_MAX) <<< FRAC;
  localparam logic signed [AW-1:0] HALF  = AW'(1) <<< (FRAC - 1);

  logic signed [X_W-1:0] x1, x2;
  logic signed [AW-1:0]  y1, y2;
  logic signed [AW-1:0]  ff, fb, acc, y_n, y_r;
  logic                  hi_n, lo_n;

  always_comb begin
    ff  = (AW'(B0) * AW'(x) + AW'(B1) * AW'(x1) + AW'(B2) * AW'(x2)) >>> X_FRAC;
    fb  = (AW'(A1) * y1 - AW'(A2) * y2) >>> FRAC;
    acc = ff + fb;
    hi_n = acc > Y_MAX;
    lo_n = acc < 0;
    if (hi_n)      y_n = Y_MAX;
    else if (lo_n) y_n = '0;
    else           y_n = acc;
    y_r = (y_n + HALF) >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0;
      y1 <= '0; y2 <= '0;
      duty    <= '0;
      d_valid <= 1'b0;
      sat_hi  <= 1'b0;
      sat_lo  <= 1'b0;
    end else begin
      d_valid <= x_valid;
      if (x_valid) begin
        x1 <= x;  x2 <= x1;
        y1 <= y_n; y2 <= y1;
        duty   <= (y_r > AW'(DUTY_MAX)) ? DUTY_BITS'(DUTY_MAX) : DUTY_BITS'(y_r);
        sat_hi <= hi_n;
        sat_lo <= lo_n;
      end
    end
  end

endmodule
