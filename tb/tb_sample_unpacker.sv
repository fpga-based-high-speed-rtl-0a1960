// tb_sample_unpacker: feeds 128-bit words of eight numbered 16-bit samples
// from a FIFO model and checks that the 32-bit output beats carry the
// samples in order, two per beat with the older in bits [15:0], under random
// output back-pressure, at one beat per clock when the sink is always ready.
`timescale 1ns/1ps
module tb_sample_unpacker;
  import daq_pkg::*;
  logic clk = 0, rst = 1;
  word_t fifo_data;
  logic fifo_empty, fifo_rd;
  logic [31:0] out_data;
  logic out_valid, out_ready = 0;
  int checks = 0, failures = 0;
  int unsigned words_in = 0, words_total = 0, samples_out = 0;
  int random_ready = 1;
  int unsigned beats = 0, busy_cycles = 0;

  always #2 clk = ~clk;

  sample_unpacker dut (.clk, .rst, .fifo_data, .fifo_empty, .fifo_rd, .out_data, .out_valid, .out_ready);

  function automatic logic [15:0] smp(input int unsigned k);
    return 16'(k * 5 + 1);
  endfunction
  always_comb
    for (int l = 0; l < 8; l++) fifo_data[l*16 +: 16] = smp(words_in * 8 + l);
  assign fifo_empty = (words_in >= words_total);

  always @(posedge clk) begin
    if (!rst) begin
      if (fifo_rd && !fifo_empty) words_in++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== {smp(samples_out + 1), smp(samples_out)}) begin
          failures++; $display("beat %0d: %h", samples_out / 2, out_data);
        end
        samples_out += 2;
        beats++;
      end
      if (!random_ready && out_valid) busy_cycles++;
    end
    #0.1;
    out_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    words_total = 50;
    wait (words_in == 50);
    repeat (3) @(posedge clk);
    random_ready = 0; beats = 0; busy_cycles = 0;
    words_total = 80;
    wait (words_in == 80);
    repeat (3) @(posedge clk);
    checks++;
    if (samples_out != 80 * 8) begin failures++; $display("samples out %0d", samples_out); end
    checks++;
    if (beats != 120 || busy_cycles != 120) begin failures++; $display("rate: %0d beats in %0d cycles", beats, busy_cycles); end
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
