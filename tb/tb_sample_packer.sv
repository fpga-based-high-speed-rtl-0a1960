// tb_sample_packer: feeds numbered samples as the four IDDR outputs of one
// channel and checks that every second cycle a 128-bit word appears holding
// eight consecutive samples, oldest in bits [15:0], each zero-padded to 16
// bits; also that dropping en restarts the word alignment.
`timescale 1ns/1ps
module tb_sample_packer;
  import daq_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  sample_t i_q0, i_q1, id_q0, id_q1;
  word_t word;
  logic word_valid;
  int checks = 0, failures = 0;
  int unsigned next_sample = 0;   // number of the next sample fed
  int unsigned expect_first = 0;  // number of the oldest sample of the next word
  int cycles_since_word = 0;

  always #2 clk = ~clk;

  sample_packer dut (.clk, .rst, .en, .i_q0, .i_q1, .id_q0, .id_q1, .word, .word_valid);

  function automatic sample_t smp(input int unsigned k);
    return sample_t'(k * 7 + 3);
  endfunction

  task automatic feed_quad();
    id_q0 = smp(next_sample);
    i_q0  = smp(next_sample + 1);
    id_q1 = smp(next_sample + 2);
    i_q1  = smp(next_sample + 3);
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (word_valid) begin
        checks++;
        for (int l = 0; l < 8; l++) begin
          if (word[l*16 +: 16] !== {4'h0, smp(expect_first + l)}) begin
            failures++;
            $display("lane %0d: %h expected %h", l, word[l*16 +: 16], smp(expect_first + l));
            break;
          end
        end
        checks++;
        if (cycles_since_word != 2 && expect_first != 0 && expect_first != 400) begin
          failures++; $display("word rate wrong: %0d cycles", cycles_since_word);
        end
        expect_first += 8;
        cycles_since_word = 1;
      end else cycles_since_word++;
    end
  end

  initial begin
    next_sample = 0;
    feed_quad();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk);
      #0.1;
      next_sample += 4;
      feed_quad();
    end
    // 100 quads = 50 words. Drop en for an odd number of cycles: alignment
    // must restart with the first quad after en returns.
    en <= 1'b0;
    repeat (3) @(posedge clk);
    next_sample = 400;
    feed_quad();
    @(posedge clk);
    // the word made from the last two quads before en dropped has come out
    en <= 1'b1;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk);
      #0.1;
      next_sample += 4;
      feed_quad();
    end
    en <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (expect_first != 400 + 160) begin
      failures++; $display("word count wrong: next expected %0d", expect_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
