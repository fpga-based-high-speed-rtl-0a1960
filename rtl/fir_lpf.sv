// fir_lpf: linear-phase FIR low-pass filter for the DDC's I and Q paths.
//
// After the mix-down of a 75 MHz IF with a 75 MHz local oscillator at
// 250 MHz, the wanted tone sits at DC and the unwanted sum tone at 150 MHz,
// which aliases to 100 MHz. The filter must pass DC and block everything
// above 25 MHz. This design uses a Hamming-windowed sinc with N taps and
// cutoff FC (cycles per sample), scaled to unity gain at DC in Q15:
//   h[n]   = sin(2*pi*FC*m) / (pi*m) * (0.54 - 0.46*cos(2*pi*n/(N-1))),
//            m = n - (N-1)/2 (h = 2*FC at m = 0)
//   c[n]   = round(32768 * h[n] / sum(h))
// With N = 31 and FC = 0.05 the response is about -39 dB at 25 MHz and
// below -55 dB from 50 MHz up. The stop-band edge comes from the document;
// the window, tap count and cutoff are this design's choices.
//
// Structure: transposed direct form, one multiply per tap per clock. Output
// is rounded down (arithmetic shift by 15) and saturated to OUT_W bits.
// Latency: two clocks from din to dout.
module fir_lpf #(
  parameter int unsigned N_TAPS = 31,
  parameter real         FC     = 0.05,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned OUT_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst,     // synchronous, active high
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam int unsigned COEF_W = 16;
  localparam int unsigned ACC_W  = IN_W + COEF_W + $clog2(N_TAPS) + 1;
  localparam real         PI     = 3.14159265358979323846;
  typedef logic signed [COEF_W-1:0] coef_tab_t [N_TAPS];

  function automatic coef_tab_t gen_coefs();
    real h [N_TAPS];
    real sum, m;
    coef_tab_t c;
    sum = 0.0;
    for (int n = 0; n < int'(N_TAPS); n++) begin
      m = real'(n) - real'(N_TAPS - 1) / 2.0;
      h[n] = (m == 0.0) ? 2.0 * FC : $sin(2.0 * PI * FC * m) / (PI * m);
      h[n] = h[n] * (0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(N_TAPS - 1)));
      sum += h[n];
    end
    for (int n = 0; n < int'(N_TAPS); n++)
      c[n] = COEF_W'($rtoi($floor(32768.0 * h[n] / sum + 0.5)));
    return c;
  endfunction

  localparam coef_tab_t COEF = gen_coefs();

  logic signed [ACC_W-1:0] z [N_TAPS];
  logic signed [ACC_W-1:0] y;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(N_TAPS); k++) z[k] <= '0;
    end else begin
      for (int k = 0; k < int'(N_TAPS) - 1; k++)
        z[k] <= z[k+1] + ACC_W'(COEF[k]) * ACC_W'(din);
      z[N_TAPS-1] <= ACC_W'(COEF[N_TAPS-1]) * ACC_W'(din);
    end
  end

  always_comb y = z[0] >>> 15;

  always_ff @(posedge clk) begin
    if (rst)                                        dout <= '0;
    else if (y > ACC_W'(2 ** (OUT_W - 1) - 1))      dout <= {1'b0, {(OUT_W-1){1'b1}}};
    else if (y < -ACC_W'(2 ** (OUT_W - 1)))         dout <= {1'b1, {(OUT_W-1){1'b0}}};
    else                                            dout <= OUT_W'(y);
  end
endmodule
