// dds_custom: output DDS of the LLRF controller, driving the DAC.
//
// A dds_core makes sin(2*pi*n*phase_inc/2^32 + phase_shift) at full scale
// 32767; the sample is multiplied by scale_fact (s1.14, 16384 = 1.0) and the
// product is shifted right by 14 and saturated to 16 bits. The programmable
// phase_inc, the 32-bit phase_shift and the s1.14 scale_fact are from the
// document; the rounding (truncation toward minus infinity) and saturation
// are this design's choices.
//
// Timing: dac_out lags phase_shift by five clocks (three in the DDS, one for
// the product, one for saturation) and scale_fact by two clocks.
module dds_custom
  import llrf_pkg::*;
(
  input  logic   clk,
  input  logic   rst,          // synchronous, active high
  input  phase_t phase_inc,
  input  phase_t phase_shift,
  input  scale_t scale_fact,
  output amp_t   dac_out
);
  localparam int unsigned PW = AMP_W + SCALE_W;
  amp_t                 sin_w, cos_unused;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] shifted;

  dds_core u_dds (
    .clk, .rst, .phase_inc, .phase_shift, .sin_out(sin_w), .cos_out(cos_unused)
  );

  always_comb shifted = prod >>> SCALE_FRAC;

  always_ff @(posedge clk) begin
    if (rst) begin
      prod    <= '0;
      dac_out <= '0;
    end else begin
      prod <= sin_w * scale_fact;
      if (shifted > PW'(32767))       dac_out <= 16'sh7FFF;
      else if (shifted < -PW'(32768)) dac_out <= 16'sh8000;
      else                            dac_out <= AMP_W'(shifted);
    end
  end
endmodule
