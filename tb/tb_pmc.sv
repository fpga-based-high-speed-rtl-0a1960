// tb_pmc: applies constant I/Q vectors in all quadrants and checks, against
// atan2 and sqrt computed here, that phase_shift = good_phase - atan2(Q, I)
// (within 0.005 degree plus two input LSBs) and scale_fact = good_mag / |I + jQ| in s1.14 (within
// 0.3 %), with saturation at 32767 for small or zero magnitudes. It also
// checks the 35-clock latency: a new vector must not show at clock 34 and
// must show at clock 35.
`timescale 1ns/1ps
module tb_pmc;
  import llrf_pkg::*;
  localparam real PI_R = 3.141592653589793;
  localparam int LAT = 35;
  logic clk = 0, rst = 1;
  iq_t i_in = '0, q_in = '0;
  phase_t good_phase = 32'h2000_0000, phase_shift;   // 45 degrees
  logic [15:0] good_mag = 16'd12000;
  scale_t scale_fact;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  pmc dut (.clk, .rst, .i_in, .q_in, .good_phase, .good_mag, .phase_shift, .scale_fact);

  task automatic check_vec(input int i_v, input int q_v, input bit check_lat);
    real ang, mag, exp_sc;
    longint exp_ph, d;
    phase_t prev_ph;
    ang = $atan2(real'(q_v), real'(i_v));
    mag = $sqrt(real'(i_v) ** 2 + real'(q_v) ** 2);
    exp_ph = longint'(good_phase) - longint'($floor(ang / (2.0 * PI_R) * 4294967296.0 + 0.5));
    exp_sc = (mag == 0.0) ? 32767.0 : real'(good_mag) * 16384.0 / mag;
    if (exp_sc > 32767.0) exp_sc = 32767.0;
    prev_ph = phase_shift;
    #0.1 i_in = iq_t'(i_v); q_in = iq_t'(q_v);
    for (int k = 1; k <= LAT; k++) begin
      @(posedge clk); #0.1;
      if (check_lat && k == LAT - 1) begin
        checks++;
        if (phase_shift != prev_ph) begin failures++; $display("output changed before %0d clocks", LAT); end
      end
    end
    d = (longint'(phase_shift) - exp_ph) % 64'sd4294967296;
    if (d > 64'sd2147483648) d -= 64'sd4294967296;
    if (d < -64'sd2147483648) d += 64'sd4294967296;
    // allowed phase error: 0.005 degree plus 2 LSB of the input vector
    checks++;
    if (mag > 0.0 && (real'(d) / 4294967296.0 * 2.0 * PI_R) ** 2 > (0.005 * PI_R / 180.0 + 2.0 / mag) ** 2) begin
      failures++; $display("(%0d,%0d): phase_shift %h expected %h", i_v, q_v, phase_shift, 32'(exp_ph));
    end
    checks++;
    if ((real'(scale_fact) - exp_sc) ** 2 > (0.003 * exp_sc + 2.0) ** 2) begin
      failures++; $display("(%0d,%0d): scale_fact %0d expected %0.1f", i_v, q_v, scale_fact, exp_sc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #0.1 rst = 0;
    check_vec(16000, 0, 0);
    check_vec(10000, 10000, 1);
    check_vec(-12000, 5000, 1);
    check_vec(-7000, -20000, 1);
    check_vec(3000, -25000, 1);
    check_vec(0, 30000, 1);
    check_vec(-32768, 0, 1);
    check_vec(5000, 1, 1);            // scale factor near the top of the range
    check_vec(3000, 1000, 1);         // saturates (good_mag > 2*|v|)
    check_vec(0, 0, 1);               // zero magnitude saturates
    good_phase = 32'hF000_0000;
    good_mag = 16'd4000;
    check_vec(1000, 2000, 0);         // set-points changed: no latency check
    for (int n = 0; n < 40; n++)
      check_vec($urandom_range(0, 40000) - 20000, $urandom_range(0, 40000) - 20000, 1);
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
