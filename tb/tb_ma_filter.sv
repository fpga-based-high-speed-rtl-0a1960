// tb_ma_filter: compares the 16-tap moving average with a reference kept
// here (sum of the last 16 inputs, divided by 16 rounding toward minus
// infinity) on every clock, for random signed 32-bit and 16-bit inputs,
// including the first 16 clocks after reset when the window holds zeros.
`timescale 1ns/1ps
module tb_ma_filter;
  logic clk = 0, rst = 1;
  logic signed [31:0] din = 0, dout;
  logic signed [15:0] din16 = 0, dout16;
  int checks = 0, failures = 0;
  longint hist [$];
  longint hist16 [$];

  always #2 clk = ~clk;

  ma_filter #(.WIDTH(32)) dut (.clk, .rst, .din, .dout);
  ma_filter #(.WIDTH(16)) dut16 (.clk, .rst, .din(din16), .dout(dout16));

  function automatic longint avg(input longint q[$]);
    longint s;
    s = 0;
    foreach (q[i]) s += q[i];
    return (s >= 0) ? s / 16 : -((-s + 15) / 16);
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin hist.push_back(0); hist16.push_back(0); end
    repeat (3) @(posedge clk); #0.1 rst = 0;
    for (int k = 0; k < 2000; k++) begin
      din   = (k < 500) ? $urandom() : (k < 1000) ? 32'sd1000 : $signed($urandom_range(0, 2000)) - 1000;
      din16 = 16'($urandom());
      @(posedge clk);
      hist.push_back(din);     void'(hist.pop_front());
      hist16.push_back(din16); void'(hist16.pop_front());
      #0.1;
      checks += 2;
      if (dout != 32'(avg(hist))) begin failures++; $display("k=%0d %0d expected %0d", k, dout, avg(hist)); end
      if (dout16 != 16'(avg(hist16))) begin failures++; $display("k=%0d (16) %0d expected %0d", k, dout16, avg(hist16)); end
    end
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
