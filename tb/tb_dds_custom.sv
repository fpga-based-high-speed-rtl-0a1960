// tb_dds_custom: checks the output DDS sample by sample against
// floor(sin(...) * 32767 * scale_fact / 16384) computed here, for several
// scale factors (1.0, 0.5, -1.0, and 1.5 which saturates), and the latency
// of five clocks from phase_shift and two clocks from scale_fact.
`timescale 1ns/1ps
module tb_dds_custom;
  import llrf_pkg::*;
  localparam real PI_R = 3.141592653589793;
  logic clk = 0, rst = 1;
  phase_t phase_inc = '0, phase_shift = '0;
  scale_t scale_fact = '0;
  amp_t dac_out;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  dds_custom dut (.clk, .rst, .phase_inc, .phase_shift, .scale_fact, .dac_out);

  function automatic int ref_out(input phase_t ph, input int sc);
    real a, v;
    a = 2.0 * PI_R * (real'(ph >> 20) + 0.5) / 4096.0;
    v = $floor($floor($sin(a) * 32767.0 + 0.5) * sc / 16384.0);
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return $rtoi(v);
  endfunction

  task automatic run(input phase_t inc, input phase_t shift, input int sc, input int n);
    phase_inc = inc; phase_shift = shift; scale_fact = scale_t'(sc);
    rst = 1; @(posedge clk); #0.1 rst = 0;
    for (int k = 1; k <= n; k++) begin
      @(posedge clk); #0.1;
      if (k >= 5) begin
        int e;
        e = ref_out(phase_t'((k - 5) * inc + shift), sc);
        checks++;
        if (int'(dac_out) - e > 1 || e - int'(dac_out) > 1) begin
          failures++; $display("sc=%0d k=%0d out %0d expected %0d", sc, k, dac_out, e);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(32'h0400_0000, 32'h0, 16384, 150);
    run(32'h0733_3333, 32'h4000_0000, 8192, 150);
    run(32'h1000_0000, 32'h1234_0000, -16384, 150);
    run(32'h0200_0000, 32'h0, 24576, 150);        // 1.5: saturates at the peaks
    // latency: phase_inc = 0, scale 1.0, phase_shift step 0 -> 90 degrees
    phase_inc = 0; phase_shift = 0; scale_fact = 16384;
    rst = 1; @(posedge clk); #0.1 rst = 0;
    repeat (8) @(posedge clk);
    #0.1 phase_shift = 32'h4000_0000;
    for (int k = 1; k <= 6; k++) begin
      @(posedge clk); #0.1;
      checks++;
      if ((k < 5 && dac_out > 100) || (k >= 5 && dac_out < 32760)) begin
        failures++; $display("phase step clock %0d: %0d", k, dac_out);
      end
    end
    // scale step 1.0 -> 0.25 shows after two clocks
    scale_fact = 4096;
    for (int k = 1; k <= 3; k++) begin
      @(posedge clk); #0.1;
      checks++;
      if ((k < 2 && dac_out < 32760) || (k >= 2 && (dac_out < 8185 || dac_out > 8195))) begin
        failures++; $display("scale step clock %0d: %0d", k, dac_out);
      end
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
