// tb_iddr: checks that the input DDR register captures D on the rising edge
// of C0 into Q0 and on the rising edge of C1 (= not C0) into Q1, so that the
// two outputs together carry every input value, each for one full period.
`timescale 1ns/1ps
module tb_iddr;
  localparam int W = 12;
  logic c0 = 1'b0, rst = 1'b1;
  logic c1;
  logic [W-1:0] d = '0, q0, q1;
  int checks = 0, failures = 0;
  int n = 0;

  assign c1 = ~c0;
  always #2 c0 = ~c0;

  iddr #(.WIDTH(W)) dut (.c0, .c1, .rst, .d, .q0, .q1);

  // The data source changes D a quarter period after every clock edge, so D
  // is centred on both edges, as the ADC's DCLK is.
  initial begin
    repeat (3) @(posedge c0);
    rst <= 1'b0;
    forever begin
      @(c0);
      #1 d = W'(n * 37 + 5);
      n++;
    end
  end

  logic [W-1:0] d_at_rise, d_at_fall;
  always @(posedge c0) d_at_rise = d;
  always @(posedge c1) d_at_fall = d;

  always @(posedge c0) if (!rst && n > 2) begin
    #0.5;
    checks++;
    if (q0 !== d_at_rise) begin failures++; $display("q0 %h expected %h", q0, d_at_rise); end
  end
  always @(posedge c1) if (!rst && n > 2) begin
    #0.5;
    checks++;
    if (q1 !== d_at_fall) begin failures++; $display("q1 %h expected %h", q1, d_at_fall); end
  end

  // Q0 must hold for a whole period: check it just before the next rise.
  always @(negedge c0) if (!rst && n > 2) begin
    #1.9;
    checks++;
    if (q0 !== d_at_rise) begin failures++; $display("q0 did not hold"); end
  end

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
