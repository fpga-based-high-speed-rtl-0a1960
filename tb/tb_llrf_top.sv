// tb_llrf_top: runs the whole LLRF chain on a synthetic cavity signal, a
// 75 MHz tone (0.3 of the clock) of amplitude A and phase phi relative to the
// DDC local oscillator, with known good phase P and magnitude M. After the
// filters settle it checks, against values computed here:
//   corr.phase_shift ~= P - phi,  corr.scale_fact ~= M / (8*A) in s1.14,
//   the loop-filtered corrections equal the raw ones (steady state),
//   and the DAC output is a sine of amplitude 32767 * scale_fact / 16384
//   whose phase follows the averaged phase_shift.
// It also checks that through a step of the input phase the averaged
// phase_shift moves by at most 1/16 of the raw swing per clock.
`timescale 1ns/1ps
module tb_llrf_top;
  import llrf_pkg::*;
  localparam real PI_R = 3.141592653589793;
  logic clk = 0, rst = 1;
  adc_t adc_in = '0;
  phase_t ddc_inc = 32'h4CCC_CCCD, dds_inc = 32'h4CCC_CCCD;
  phase_t good_phase = 32'h1555_5555;       // 30 degrees
  logic [15:0] good_mag = 16'd10000;
  iq_t i_bb, q_bb;
  correction_t corr, corr_avg;
  amp_t dac_out;
  int checks = 0, failures = 0;
  real amp = 1500.0, phi = 50.0;            // degrees
  int unsigned e = 0;
  bit started = 0;

  always #2 clk = ~clk;

  llrf_top dut (
    .clk, .rst, .adc_in, .ddc_phase_inc(ddc_inc), .dds_phase_inc(dds_inc),
    .good_phase, .good_mag, .i_bb, .q_bb, .corr, .corr_avg, .dac_out
  );

  // tone referred to the DDC oscillator (see tb_ddc_custom)
  always @(posedge clk) begin
    #0.2;
    if (rst || !started) e = 0; else e++;
    started = !rst;
    adc_in = adc_t'($rtoi($floor(amp * $cos(2.0 * PI_R * 0.3 * real'(e) + phi * PI_R / 180.0) + 0.5)));
  end

  function automatic real wrap_deg(input real d);
    while (d > 180.0) d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction
  function automatic real ph_deg(input phase_t p);
    return wrap_deg(real'(p) / 4294967296.0 * 360.0);
  endfunction

  task automatic check_steady(input string tag);
    real exp_ph, exp_sc, peak, exp_peak;
    exp_ph = wrap_deg(30.0 - phi);
    exp_sc = real'(good_mag) * 16384.0 / (8.0 * amp);
    checks++;
    if ($sqrt(wrap_deg(ph_deg(corr.phase_shift) - exp_ph) ** 2) > 0.5) begin
      failures++; $display("%s: phase_shift %0.2f deg expected %0.2f", tag, ph_deg(corr.phase_shift), exp_ph);
    end
    checks++;
    if ((real'(corr.scale_fact) - exp_sc) ** 2 > (0.02 * exp_sc) ** 2) begin
      failures++; $display("%s: scale_fact %0d expected %0.0f", tag, corr.scale_fact, exp_sc);
    end
    checks++;
    if ($sqrt(wrap_deg(ph_deg(corr_avg.phase_shift) - ph_deg(corr.phase_shift)) ** 2) > 1.0 ||
        (real'(corr_avg.scale_fact) - real'(corr.scale_fact)) ** 2 > (0.005 * exp_sc) ** 2) begin
      failures++; $display("%s: loop filter output differs from its steady input: %h %h %0d %0d", tag,
                           corr_avg.phase_shift, corr.phase_shift, corr_avg.scale_fact, corr.scale_fact);
    end
    // DAC amplitude: peak over 100 samples of a 0.3 Fs sine
    peak = 0.0;
    for (int k = 0; k < 100; k++) begin
      @(posedge clk); #0.2;
      if (real'(dac_out) > peak) peak = real'(dac_out);
    end
    exp_peak = 32767.0 * real'(corr_avg.scale_fact) / 16384.0;
    if (exp_peak > 32767.0) exp_peak = 32767.0;           // saturation
    checks++;
    if ((peak - exp_peak) ** 2 > (0.01 * exp_peak + 3.0) ** 2) begin
      failures++; $display("%s: DAC peak %0.0f for scale %0d", tag, peak, corr_avg.scale_fact);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #0.1 rst = 0;
    repeat (200) @(posedge clk);
    check_steady("A=1500 phi=50");
    // phase step of the cavity signal: the averaged correction moves over
    // 16 clocks, the raw one at once
    phi = -20.0;
    repeat (200) @(posedge clk);
    check_steady("phi=-20");
    amp = 900.0;
    repeat (200) @(posedge clk);
    check_steady("A=900");
    // through a phase step the averaged correction changes by at most 1/16
    // of the raw correction's range per clock (16-tap moving average)
    phi = 10.0;
    begin
      real rmin, rmax, dmax, prev, cur, raw;
      rmin = 1000.0; rmax = -1000.0; dmax = 0.0;
      prev = ph_deg(corr_avg.phase_shift);
      for (int k = 0; k < 150; k++) begin
        @(posedge clk); #0.2;
        raw = ph_deg(corr.phase_shift);
        cur = ph_deg(corr_avg.phase_shift);
        if (raw < rmin) rmin = raw;
        if (raw > rmax) rmax = raw;
        if ($sqrt((cur - prev) ** 2) > dmax) dmax = $sqrt((cur - prev) ** 2);
        prev = cur;
      end
      checks++;
      if (rmax - rmin < 25.0 || dmax > (rmax - rmin) / 16.0 + 0.1) begin
        failures++; $display("phase step: raw range %0.2f, largest averaged step %0.3f", rmax - rmin, dmax);
      end
    end
    repeat (200) @(posedge clk);
    check_steady("phi=10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
