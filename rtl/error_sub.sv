// Error former of the digital controller: e[n] = Vref[n] - Vfb[n].
//
// On every cycle with in_valid high the unsigned reference and ADC codes are
// zero-extended and subtracted; the signed difference, one bit wider than the
// codes so it never overflows, is registered and e_valid pulses one clock
// later. The equation is the design's; the registered one-cycle latency,
// the widths and the asynchronous active-low reset are this implementation's.
module error_sub #(
  parameter int unsigned ADC_BITS = buck_ctrl_pkg::ADC_BITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [ADC_BITS-1:0]        vref,
  input  logic [ADC_BITS-1:0]        vfb,
  output logic                       e_valid,
  output logic signed [ADC_BITS:0]   e
);

  logic signed [ADC_BITS:0] diff;

  always_comb diff = $signed({1'b0, vref}) - $signed({1'b0, vfb});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e       <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= in_valid;
      if (in_valid) e <= diff;
    end
  end

endmodule
