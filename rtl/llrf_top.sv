// llrf_top: direct-sampling low-level RF controller.
//
// The cavity probe signal, sampled by the ADC at Fs, is brought to baseband
// by ddc_custom (DDS local oscillator at ddc_phase_inc, complex mixer, two
// FIR low-pass filters). pmc compares the measured phase and magnitude with
// the known good set-points and produces a phase_shift and a scale_fact.
// Two 16-tap moving averages (ma_filter) smooth these corrections, which
// then set the phase and amplitude of the output DDS (dds_custom) that
// drives the DAC at dds_phase_inc. This chain, its four cores and its
// signal names follow the document; all blocks run on one clock (250 MHz in
// the document) and process one sample per clock.
//
// Interface: all set-points are static registers from the host. Every
// intermediate signal is brought out for observation.
//
// Timing from adc_in to dac_out, for the default parameters: 3 (LO and
// sample alignment) + 1 (mixer) + 2 (FIR) + 35 (pmc) + 1 (MA) + 5 (output
// DDS) = 47 clocks for the first effect, plus the FIR and MA windows
// (31 + 16 samples) for a step to settle.
module llrf_top
  import llrf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,             // synchronous, active high
  input  adc_t        adc_in,          // IF samples, two's complement
  input  phase_t      ddc_phase_inc,   // cavity resonant frequency
  input  phase_t      dds_phase_inc,   // output frequency
  input  phase_t      good_phase,      // known good phase
  input  logic [15:0] good_mag,        // known good magnitude
  output iq_t         i_bb,            // baseband I
  output iq_t         q_bb,            // baseband Q
  output correction_t corr,            // from the comparator
  output correction_t corr_avg,        // after the loop filters
  output amp_t        dac_out          // to the DAC
);
  ddc_custom u_ddc (
    .clk, .rst, .adc_in, .phase_inc(ddc_phase_inc), .i_out(i_bb), .q_out(q_bb)
  );

  pmc u_pmc (
    .clk, .rst, .i_in(i_bb), .q_in(q_bb), .good_phase, .good_mag,
    .phase_shift(corr.phase_shift), .scale_fact(corr.scale_fact)
  );

  ma_filter #(.WIDTH(PHASE_W)) u_ma_phase (
    .clk, .rst, .din(corr.phase_shift), .dout(corr_avg.phase_shift)
  );

  ma_filter #(.WIDTH(SCALE_W)) u_ma_scale (
    .clk, .rst, .din(corr.scale_fact), .dout(corr_avg.scale_fact)
  );

  dds_custom u_dds (
    .clk, .rst, .phase_inc(dds_phase_inc), .phase_shift(corr_avg.phase_shift),
    .scale_fact(corr_avg.scale_fact), .dac_out
  );
endmodule
