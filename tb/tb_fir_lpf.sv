// tb_fir_lpf: checks the low-pass filter's impulse response against a
// Hamming-windowed sinc (31 taps, cutoff 0.05 cycles/sample) computed here,
// its two-clock latency, unity DC gain, and the attenuation of a 100 MHz tone
// (0.4 cycles/sample, the alias of the mixer's 150 MHz sum tone at 250 MHz)
// and of a 25 MHz tone.
`timescale 1ns/1ps
module tb_fir_lpf;
  localparam int N = 31;
  logic clk = 0, rst = 1;
  logic signed [15:0] din = 0, dout;
  int checks = 0, failures = 0;
  real h [N];
  int  c [N];

  always #2 clk = ~clk;

  fir_lpf dut (.clk, .rst, .din, .dout);

  task automatic tone_gain(input real f, output real g);
    real a, peak;
    peak = 0.0;
    din = 0;
    repeat (40) @(posedge clk);
    for (int k = 0; k < 400; k++) begin
      a = 20000.0 * $cos(2.0 * 3.141592653589793 * f * k);
      #0.1 din = 16'($rtoi(a));
      @(posedge clk);
      if (k > 60 && (dout > peak || -dout > peak)) peak = (dout > 0) ? dout : -dout;
    end
    g = peak / 20000.0;
  endtask

  initial begin
    real sum, g;
    sum = 0.0;
    for (int n = 0; n < N; n++) begin
      real m;
      m = n - 15.0;
      h[n] = (n == 15) ? 0.1 : $sin(2.0 * 3.141592653589793 * 0.05 * m) / (3.141592653589793 * m);
      h[n] *= 0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * n / 30.0);
      sum += h[n];
    end
    for (int n = 0; n < N; n++) c[n] = $rtoi($floor(32768.0 * h[n] / sum + 0.5));

    repeat (3) @(posedge clk); #0.1 rst = 0;
    repeat (2) @(posedge clk);
    // impulse of 16384: output n is floor(c[n] / 2), starting two clocks later
    #0.1 din = 16384;
    @(posedge clk); #0.1 din = 0;
    checks++;
    if (dout != 0) begin failures++; $display("output one clock early"); end
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #0.1;
      checks++;
      if (dout != 16'($rtoi($floor(real'(c[n]) / 2.0)))) begin
        failures++; $display("tap %0d: %0d expected %0d", n, dout, c[n] / 2);
      end
    end
    // DC gain
    din = 10000;
    repeat (40) @(posedge clk); #0.1;
    checks++;
    if (dout < 9995 || dout > 10005) begin failures++; $display("DC gain: %0d", dout); end
    tone_gain(0.4, g);
    checks++;
    if (g > 0.003) begin failures++; $display("100 MHz gain %f", g); end
    tone_gain(0.1, g);
    checks++;
    if (g > 0.02) begin failures++; $display("25 MHz gain %f", g); end
    tone_gain(0.004, g);
    checks++;
    if (g < 0.95) begin failures++; $display("1 MHz gain %f", g); end
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
