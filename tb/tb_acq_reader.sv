// tb_acq_reader: a memory model returns read data in order after a random
// latency of 2 to 9 cycles and cannot be stalled; a FIFO_DDR model is
// emptied slowly. The test checks that every record word arrives once, in
// order, from the right (wrapping) address, that FIFO_DDR never overflows,
// that the reader stalls for credit when the FIFO is full, and that busy
// drops after the last word.
`timescale 1ns/1ps
module tb_acq_reader;
  import daq_pkg::*;
  localparam int AW = 6, DEPTH = 16;
  logic clk = 0, rst = 1, start = 0;
  logic [AW-1:0] rec_addr = '0;
  logic [AW:0] rec_words = '0;
  logic rd_valid, rd_ready = 0, rdata_valid = 0;
  logic [AW-1:0] rd_addr;
  word_t rdata = '0;
  logic fifo_wr_en;
  word_t fifo_wr_data;
  logic [$clog2(DEPTH):0] fifo_count = '0;
  logic busy;
  logic [31:0] stalls;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  acq_reader #(.AW(AW), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst, .start, .rec_addr, .rec_words, .rd_valid, .rd_ready, .rd_addr,
    .rdata_valid, .rdata, .fifo_wr_en, .fifo_wr_data, .fifo_wr_count(fifo_count),
    .busy, .credit_stalls(stalls)
  );

  function automatic word_t content(input int unsigned a);
    return {4{a * 32'h9E37_79B9 + 32'd17}};
  endfunction

  // memory: in-order return queue with per-command due times
  int unsigned due_q[$];
  int unsigned addr_q[$];
  int unsigned cyc = 0;
  int unsigned fifo_level = 0, received = 0, expect_addr;
  int fifo_slow = 1;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (rd_valid && rd_ready) begin
        addr_q.push_back(rd_addr);
        due_q.push_back(cyc + $urandom_range(2, 9));
      end
      if (fifo_wr_en) begin
        fifo_level++;
        received++;
        checks++;
        if (fifo_wr_data !== content(expect_addr)) begin
          failures++; $display("word %0d from wrong address", received);
        end
        expect_addr = (expect_addr + 1) % (2**AW);
      end
      checks++;
      if (fifo_level > DEPTH) begin failures++; $display("FIFO_DDR overflow"); end
      // the FIFO drains one word every 4 cycles (slow) or every cycle
      if (fifo_level > 0 && (fifo_slow == 0 || cyc % 4 == 0)) fifo_level--;
    end
    #0.1;
    rd_ready = ($urandom_range(0, 3) != 0);
    fifo_count = ($clog2(DEPTH)+1)'(fifo_level);
    rdata_valid = 0;
    if (due_q.size() > 0 && due_q[0] <= cyc) begin
      void'(due_q.pop_front());
      rdata = content(addr_q.pop_front());
      rdata_valid = 1;
      // keep the in-order guarantee: later entries cannot be due earlier
      if (due_q.size() > 0 && due_q[0] <= cyc) due_q[0] = cyc + 1;
    end
  end

  task automatic read_record(input int a, input int n);
    rec_addr = AW'(a); rec_words = (AW+1)'(n);
    received = 0; expect_addr = a;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    #0.2;
    checks++;
    if (!busy) begin failures++; $display("busy not raised by start"); end
    wait (!busy);
    @(posedge clk);
    checks++;
    if (received != n) begin failures++; $display("received %0d of %0d", received, n); end
    checks++;
    if (due_q.size() != 0) begin failures++; $display("busy dropped with reads in flight"); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (2) @(posedge clk);
    read_record(50, 64);            // wraps at 64 words
    checks++;
    if (stalls == 0) begin failures++; $display("reader never waited for FIFO room"); end
    fifo_slow = 0;
    read_record(0, 10);
    read_record(63, 1);
    $display("credit stalls: %0d", stalls);
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
