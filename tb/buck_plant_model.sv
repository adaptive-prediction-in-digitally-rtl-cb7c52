// Behavioural model (testbench only, not synthesizable) of the analog side of
// the loop: power stage, feedback divider and ADC.
//
// The power stage and divider are represented by the discretized plant with
// a 0.5 us sampling period,
//   Gp(z) = (0.01068 z^-1 + 0.0002769 z^-2) / (1 - 1.928 z^-1 + 0.9395 z^-2),
// which maps the duty command in DPWM counts to the feedback voltage in ADC
// LSBs and already contains the ADC/DPWM gain, the divider ratio and the
// loop delay. Its input is the duty the DPWM holds, averaged over each
// sampling interval, minus a disturbance `load_dist` (in duty counts) that stands
// for the extra duty a heavier load needs. At every adc_start the model
// advances the plant by one sample, rounds the feedback voltage to an ADC_BITS
// code and returns it with a one-cycle adc_valid pulse CONV_CYCLES clocks
// later (the conversion time). vout is the unrounded feedback voltage.
module buck_plant_model #(
  parameter int unsigned ADC_BITS    = 8,
  parameter int unsigned DUTY_BITS   = 9,
  parameter int unsigned CONV_CYCLES = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adc_start,
  input  logic [DUTY_BITS-1:0] duty_held,
  input  int                   load_dist,
  output logic                 adc_valid,
  output logic [ADC_BITS-1:0]  adc_code,
  output real                  vout
);

  real v1, v2, u1, acc;
  int  nacc;
  int  conv_cnt;
  logic [ADC_BITS-1:0] code_q;

  function automatic logic [ADC_BITS-1:0] quantize(input real v);
    real r;
    r = v + 0.5;
    if (r < 0.0) return '0;
    if (r >= real'(2 ** ADC_BITS)) return '1;
    return ADC_BITS'(int'($floor(r)));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 0.0; v2 <= 0.0; u1 <= 0.0;
      acc <= 0.0; nacc <= 0;
      conv_cnt <= 0;
      adc_valid <= 1'b0;
      adc_code <= '0;
      code_q <= '0;
      vout <= 0.0;
    end else begin
      adc_valid <= 1'b0;
      if (adc_start) begin
        real u, v;
        u = ((nacc > 0) ? (acc + real'(duty_held)) / real'(nacc + 1) : real'(duty_held)) - real'(load_dist);
        v = 1.928 * v1 - 0.9395 * v2 + 0.01068 * u + 0.0002769 * u1;
        v2 <= v1; v1 <= v;
        u1 <= u;
        vout <= v;
        code_q <= quantize(v);
        acc <= 0.0; nacc <= 0;
        conv_cnt <= CONV_CYCLES;
      end else begin
        acc <= acc + real'(duty_held);
        nacc <= nacc + 1;
        if (conv_cnt != 0) begin
          conv_cnt <= conv_cnt - 1;
          if (conv_cnt == 1) begin
            adc_valid <= 1'b1;
            adc_code <= code_q;
          end
        end
      end
    end
  end

endmodule
