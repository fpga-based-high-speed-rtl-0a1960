// llrf_pkg: widths, constants and the sine table shared by the LLRF
// controller blocks.
//
// Phases are 32-bit unsigned words in which the full range 2^32 is 360
// degrees. Scale factors are 16-bit signed s1.14 numbers (1.0 = 16384).
// The DDS sine table holds one quarter of a 4096-point (12-bit phase) sine
// period, sampled at the centre of each step:
//   SIN_QTR[k] = round(32767 * sin(2*pi*(k + 0.5) / 4096)),  k = 0 .. 1023
// so the other three quarters follow by mirroring and negation without any
// special case at 0 or 180 degrees.
package llrf_pkg;
  localparam int unsigned PHASE_W = 32;   // phase_inc, phase_shift
  localparam int unsigned SCALE_W = 16;   // scale_fact, s1.14
  localparam int unsigned SCALE_FRAC = 14;
  localparam int unsigned ADC_W   = 12;   // IF input samples
  localparam int unsigned AMP_W   = 16;   // DDS and DAC samples
  localparam int unsigned LUT_AW  = 12;   // DDS phase resolution
  localparam int unsigned IQ_W    = 16;   // baseband I/Q after the DDC
  localparam real         PI      = 3.14159265358979323846;

  typedef logic        [PHASE_W-1:0] phase_t;
  typedef logic signed [SCALE_W-1:0] scale_t;
  typedef logic signed [ADC_W-1:0]   adc_t;
  typedef logic signed [AMP_W-1:0]   amp_t;
  typedef logic signed [IQ_W-1:0]    iq_t;

  localparam int unsigned QTR = 2 ** (LUT_AW - 2);   // 1024 entries
  typedef logic [AMP_W-2:0] qtr_tab_t [QTR];        // magnitudes, 15 bits

  function automatic qtr_tab_t gen_sin_qtr();
    qtr_tab_t r;
    for (int k = 0; k < int'(QTR); k++)
      r[k] = (AMP_W-1)'($rtoi($floor(32767.0 * $sin(2.0 * PI * (real'(k) + 0.5)
                                                    / real'(2 ** LUT_AW)) + 0.5)));
    return r;
  endfunction

  localparam qtr_tab_t SIN_QTR = gen_sin_qtr();

  typedef struct packed {
    phase_t phase_shift;
    scale_t scale_fact;
  } correction_t;
endpackage
