// tb_ddc_custom: feeds a 75 MHz tone (0.3 of the clock) of amplitude A and
// phase phi, referred to the local oscillator, and checks that the baseband
// outputs settle to I = 8*A*cos(phi), Q = 8*A*sin(phi) within 1.5 % of full
// amplitude, for several phases and amplitudes. A tone 40 MHz away from the
// local oscillator must be suppressed.
`timescale 1ns/1ps
module tb_ddc_custom;
  import llrf_pkg::*;
  localparam real PI_R = 3.141592653589793;
  logic clk = 0, rst = 1;
  adc_t adc_in = '0;
  phase_t phase_inc = 32'h4CCC_CCCD;   // 0.3 * 2^32
  iq_t i_out, q_out;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  ddc_custom dut (.clk, .rst, .adc_in, .phase_inc, .i_out, .q_out);

  // After reset release, clock edge e (e = 0 for the first edge with rst low)
  // is followed by the sample A*cos(theta*e + phi), theta = 2*pi*phase_inc/2^32.
  task automatic run(input real amp, input real phi_deg, input real f_off, output real i_r, output real q_r);
    real theta;
    theta = 2.0 * PI_R * (real'(phase_inc) / 4294967296.0 + f_off);
    rst = 1; adc_in = '0;
    repeat (2) @(posedge clk);
    #0.1 rst = 0;
    adc_in = adc_t'($rtoi(amp * $cos(phi_deg * PI_R / 180.0)));
    for (int e = 1; e < 300; e++) begin
      @(posedge clk); #0.1;
      adc_in = adc_t'($rtoi($floor(amp * $cos(theta * e + phi_deg * PI_R / 180.0) + 0.5)));
    end
    i_r = real'(i_out); q_r = real'(q_out);
  endtask

  initial begin
    real i_r, q_r, amps [3], phis [5];
    amps = '{2000.0, 1000.0, 300.0};
    phis = '{0.0, 37.0, 100.0, -135.0, 200.0};
    foreach (amps[a]) foreach (phis[p]) begin
      real ei, eq;
      run(amps[a], phis[p], 0.0, i_r, q_r);
      ei = 8.0 * amps[a] * $cos(phis[p] * PI_R / 180.0);
      eq = 8.0 * amps[a] * $sin(phis[p] * PI_R / 180.0);
      checks++;
      if ((i_r - ei) ** 2 + (q_r - eq) ** 2 > (0.015 * 8.0 * amps[a]) ** 2) begin
        failures++;
        $display("A=%0.0f phi=%0.0f: I=%0.0f Q=%0.0f expected %0.0f %0.0f", amps[a], phis[p], i_r, q_r, ei, eq);
      end
    end
    // 40 MHz offset: the mixed tone is at 40 MHz and must be filtered out
    run(2000.0, 0.0, 0.16, i_r, q_r);
    checks++;
    if (i_r * i_r + q_r * q_r > (0.02 * 16000.0) ** 2) begin
      failures++; $display("off-frequency tone passed: %0.0f %0.0f", i_r, q_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
