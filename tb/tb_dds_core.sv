// tb_dds_core: checks the DDS against sine and cosine computed here with
// real arithmetic, cycle by cycle: after reset the output at clock k is
// sin(2*pi*(((k-3)*phase_inc + phase_shift) >> 20) + 0.5)/4096) * 32767,
// i.e. a three-clock latency. Covers several frequencies, all quadrants and
// a phase_shift step.
`timescale 1ns/1ps
module tb_dds_core;
  import llrf_pkg::*;
  logic clk = 0, rst = 1;
  phase_t phase_inc = '0, phase_shift = '0;
  amp_t sin_out, cos_out;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  dds_core dut (.clk, .rst, .phase_inc, .phase_shift, .sin_out, .cos_out);

  function automatic int ref_val(input phase_t ph, input bit cosine);
    real a;
    a = 2.0 * 3.141592653589793 * (real'(ph >> 20) + 0.5) / 4096.0;
    return $rtoi($floor((cosine ? $cos(a) : $sin(a)) * 32767.0 + 0.5));
  endfunction

  // run n clocks after reset and compare every output
  task automatic run(input phase_t inc, input phase_t shift, input int n);
    phase_t acc;
    phase_inc = inc; phase_shift = shift;
    rst = 1; @(posedge clk); #0.1 rst = 0;
    acc = '0;
    for (int k = 1; k <= n; k++) begin
      @(posedge clk); #0.1;
      if (k >= 3) begin
        int es, ec;
        es = ref_val(phase_t'((k - 3) * inc + shift), 0);
        ec = ref_val(phase_t'((k - 3) * inc + shift), 1);
        checks += 2;
        if (int'(sin_out) - es > 1 || es - int'(sin_out) > 1 ||
            int'(cos_out) - ec > 1 || ec - int'(cos_out) > 1) begin
          failures++;
          $display("k=%0d sin %0d exp %0d cos %0d exp %0d", k, sin_out, es, cos_out, ec);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(32'h0400_0000, 32'h0, 200);          // Fs/64
    run(32'h4CCC_CCCD, 32'h1234_5678, 300);  // 0.3 Fs, 75 MHz at 250 MHz
    run(32'h0010_0000, 32'hC000_0000, 4200); // one LUT step per clock: every entry
    // latency of a phase_shift step with phase_inc = 0
    phase_inc = 0; phase_shift = 0;
    rst = 1; @(posedge clk); #0.1 rst = 0;
    repeat (5) @(posedge clk);
    #0.1 phase_shift = 32'h4000_0000;        // +90 degrees
    @(posedge clk); #0.1;
    for (int k = 1; k <= 4; k++) begin
      checks++;
      if ((k < 3 && sin_out > 100) || (k >= 3 && sin_out < 32760)) begin
        failures++; $display("phase step: clock %0d sin %0d", k, sin_out);
      end
      @(posedge clk); #0.1;
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
