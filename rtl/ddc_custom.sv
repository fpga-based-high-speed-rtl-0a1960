// ddc_custom: digital down-converter, the input stage of the LLRF controller.
//
// The IF samples from the ADC are multiplied by the cosine and sine of an
// internal DDS running at phase_inc (set to the cavity's resonant frequency),
// giving I = x*cos and Q = -x*sin. Each product is low-pass filtered
// (fir_lpf) to keep only the baseband component. For an input
// x = A*cos(w*t + phi) at the DDS frequency the outputs settle to
//   I ~= 8*A*cos(phi),  Q ~= 8*A*sin(phi)
// (the product is shifted right by 11 and mixing halves the amplitude), so
// atan2(Q, I) is the input phase relative to the DDS. The DDS + complex
// mixer + two LPF structure is the document's; the scaling and signs are
// this design's.
//
// Timing: the mixer adds one register; the filters add two. Input samples are
// two's complement.
module ddc_custom
  import llrf_pkg::*;
(
  input  logic   clk,
  input  logic   rst,         // synchronous, active high
  input  adc_t   adc_in,
  input  phase_t phase_inc,
  output iq_t    i_out,
  output iq_t    q_out
);
  localparam int unsigned PROD_W = ADC_W + AMP_W;
  localparam int unsigned SHIFT  = ADC_W - 1;   // 11

  amp_t sin_lo, cos_lo;
  adc_t x_d [3];                                 // matches the DDS latency
  logic signed [PROD_W-1:0] p_i, p_q;
  iq_t  mix_i, mix_q;

  dds_core u_lo (
    .clk, .rst, .phase_inc, .phase_shift('0), .sin_out(sin_lo), .cos_out(cos_lo)
  );

  always_comb begin
    p_i = x_d[2] * cos_lo;
    p_q = -(x_d[2] * sin_lo);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_d   <= '{default: '0};
      mix_i <= '0;
      mix_q <= '0;
    end else begin
      x_d   <= '{adc_in, x_d[0], x_d[1]};
      mix_i <= IQ_W'(p_i >>> SHIFT);
      mix_q <= IQ_W'(p_q >>> SHIFT);
    end
  end

  fir_lpf #(.IN_W(IQ_W), .OUT_W(IQ_W)) u_lpf_i (.clk, .rst, .din(mix_i), .dout(i_out));
  fir_lpf #(.IN_W(IQ_W), .OUT_W(IQ_W)) u_lpf_q (.clk, .rst, .din(mix_q), .dout(q_out));
endmodule
