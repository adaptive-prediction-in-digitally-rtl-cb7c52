// Shared widths and constants of the digital voltage-mode buck controller.
//
// The controller runs from one system clock. The DPWM counts that clock, so
// the switching period is PWM_PERIOD clock cycles and the ADC is sampled
// twice per period (an oversampling ratio of two). The switching frequency
// (1 MHz) and the sampling frequency (2 MHz) follow the design's system
// specification; the 256 MHz counter clock, the 8-bit ADC and DPWM
// resolutions and the fixed-point formats are this implementation's choices.
//
// IIR compensator coefficients are held as signed Q(IIR_FRAC) integers:
//   numerator   9.166, -16.69, 7.582   -> round(x * 2^10)
//   denominator 1 - 1.516 z^-1 + 0.5156 z^-2. The printed denominator
//   coefficients are the binary fractions 97/64 and 33/64, for which the
//   denominator factors exactly as (1 - z^-1)(1 - (33/64) z^-1): an
//   integrator times a real pole. These exact values are used so that the
//   integrator pole sits on z = 1 instead of just outside the unit circle.
package buck_ctrl_pkg;

  // Timing (system specification: fsw = 1 MHz, fsam = 2 MHz)
  localparam int unsigned CLK_HZ     = 256_000_000;
  localparam int unsigned FSW_HZ     = 1_000_000;
  localparam int unsigned FSAM_HZ    = 2_000_000;
  localparam int unsigned PWM_PERIOD = CLK_HZ / FSW_HZ;    // 256 counts
  localparam int unsigned OSR        = FSAM_HZ / FSW_HZ;   // 2 samples per period

  // Word widths
  localparam int unsigned ADC_BITS  = 8;                  // ADC code, unsigned
  localparam int unsigned E_W       = ADC_BITS + 1;       // error e[n], signed
  localparam int unsigned PRED_FRAC = 4;                  // fraction bits of e_hat
  localparam int unsigned EH_W      = E_W + 2 + PRED_FRAC; // prediction e_hat, signed
  localparam int unsigned DUTY_BITS = $clog2(PWM_PERIOD) + 1; // 0 .. PWM_PERIOD

  // Adaptive predictor: threshold eps, bin edges for k and the upper bound
  // on |de| (in ADC LSBs). k = 2 for eps <= |de| < TH_K3, k = 3 up to TH_K4,
  // k = 4 above; each bin starts where its shift still leaves a non-zero term.
  localparam int unsigned PRED_EPS    = 2;
  localparam int unsigned PRED_TH_K3  = 16;
  localparam int unsigned PRED_TH_K4  = 32;
  localparam int unsigned PRED_DE_MAX = 64;

  // IIR compensator, eq. (12), in Q10
  localparam int unsigned IIR_FRAC = 10;
  localparam int IIR_B0 =   9386;   //  9.166
  localparam int IIR_B1 = -17091;   // -16.69
  localparam int IIR_B2 =   7764;   //  7.582
  localparam int IIR_A1 =   1552;   //  1.515625 (97/64), y[n-1] weight
  localparam int IIR_A2 =    528;   //  0.515625 (33/64), y[n-2] weight (subtracted)

  // Event record of one prediction step, for observation and test
  typedef struct packed {
    logic       adapted;   // a non-zero correction term was applied
    logic       zeroed;    // |de| fell below eps, correction forced to 0
    logic       clipped;   // |de| was limited by the upper bound
    logic [2:0] k;         // shift used (0 when no correction)
  } pred_evt_t;

endpackage
