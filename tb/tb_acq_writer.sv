// tb_acq_writer: drives the writer with two show-ahead FIFO models full of
// tagged, numbered words and a memory port with random back-pressure, in a
// 16-word ring (AW = 4) so that the ring wraps. It checks that only the
// selected channel is written, that the record (capture_words words from
// rec_addr) holds consecutive words, that the trigger word sits pretrig_words
// after rec_addr and was taken within the synchronizer delay of the trigger,
// that early triggers are ignored and counted, and that the other channel's
// FIFO is drained.
`timescale 1ns/1ps
module tb_acq_writer;
  import daq_pkg::*;
  localparam int AW = 4;
  logic clk = 0, rst = 1;
  logic arm = 0, trigger = 0;
  ch_sel_e ch_sel = CH_Q;
  logic [AW:0] pretrig_words = 5, capture_words = 12;
  word_t fi_data, fq_data;
  logic fi_empty, fq_empty, fi_rd, fq_rd;
  logic wr_valid, wr_ready = 0;
  logic [AW-1:0] wr_addr, rec_addr, trig_addr;
  word_t wr_data;
  acq_state_e state;
  logic done;
  logic [15:0] early;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  acq_writer #(.AW(AW)) dut (
    .clk, .rst, .arm, .ch_sel, .pretrig_words, .capture_words, .trigger,
    .fifo_i_data(fi_data), .fifo_i_empty(fi_empty), .fifo_i_rd(fi_rd),
    .fifo_q_data(fq_data), .fifo_q_empty(fq_empty), .fifo_q_rd(fq_rd),
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .state, .done, .rec_addr, .trig_addr,
    .early_trig_count(early)
  );

  // FIFO models: an endless supply of words tag<<64 | sequence number,
  // present about two cycles in three.
  int unsigned ni = 0, nq = 0;
  logic avail_i = 0, avail_q = 0;
  assign fi_empty = !avail_i;
  assign fq_empty = !avail_q;
  assign fi_data  = {32'h0, 32'h1111_1111, 32'h0, ni};
  assign fq_data  = {32'h0, 32'h2222_2222, 32'h0, nq};

  word_t mem [2**AW];
  int unsigned writes = 0;
  int unsigned popped_sel = 0;   // words popped from the selected FIFO

  always @(posedge clk) begin
    if (!rst) begin
      if (fi_rd && !fi_empty) begin ni++; if (ch_sel == CH_I) popped_sel++; end
      if (fq_rd && !fq_empty) begin nq++; if (ch_sel == CH_Q) popped_sel++; end
      if (wr_valid && wr_ready) begin mem[wr_addr] = wr_data; writes++; end
    end
    #0.1;
    avail_i  = ($urandom_range(0, 2) != 0);
    avail_q  = ($urandom_range(0, 2) != 0);
    wr_ready = ($urandom_range(0, 3) != 0);
  end

  // Pre-fills and checks one capture; the trigger rises once trig_after
  // words of the selected channel have been popped since arming.
  task automatic capture(input ch_sel_e sel, input int pre, input int cap,
                         input int trig_after, input bit early_trig);
    int unsigned pop_at_trig, first, early0;
    ch_sel = sel; pretrig_words = (AW+1)'(pre); capture_words = (AW+1)'(cap);
    early0 = early;
    @(posedge clk); arm <= 1; @(posedge clk); arm <= 0;
    popped_sel = 0;
    if (early_trig) begin
      // a trigger before the pre-trigger history exists must be ignored
      wait (popped_sel >= 1); @(posedge clk);
      trigger <= 1; repeat (4) @(posedge clk); trigger <= 0; repeat (4) @(posedge clk);
      checks++;
      if (early != early0 + 1 || state != ACQ_ARMED) begin
        failures++; $display("early trigger not ignored (count %0d state %0d)", early, state);
      end
    end
    wait (popped_sel >= trig_after);
    @(posedge clk);
    pop_at_trig = popped_sel;
    trigger <= 1;
    wait (done);
    trigger <= 0;
    @(posedge clk);
    checks++;
    if (trig_addr != AW'(rec_addr + pre)) begin failures++; $display("trig_addr %0d rec_addr %0d", trig_addr, rec_addr); end
    // record contents: consecutive words of the selected channel
    first = mem[rec_addr][31:0];
    for (int k = 0; k < cap; k++) begin
      word_t w;
      w = mem[AW'(rec_addr + k)];
      checks++;
      if (w[95:64] != ((sel == CH_I) ? 32'h1111_1111 : 32'h2222_2222) || w[31:0] != first + k) begin
        failures++; $display("record word %0d: %h", k, w);
      end
    end
    // trigger word: taken after the trigger, within the synchronizer delay
    checks++;
    begin
      int unsigned tw, base;
      tw   = mem[trig_addr][31:0];
      base = (sel == CH_I) ? ni : nq;
      base = base - popped_sel;                 // sequence number at arm
      if (tw - base < pop_at_trig || tw - base > pop_at_trig + 4) begin
        failures++; $display("trigger word %0d, popped at trigger %0d", tw - base, pop_at_trig);
      end
    end
  endtask

  int unsigned nq0;
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (10) @(posedge clk);
    // idle: both FIFOs are drained
    checks++;
    if (ni < 3 || nq < 3) begin failures++; $display("FIFOs not drained when idle"); end
    capture(CH_Q, 5, 12, 40, 1);    // wraps the 16-word ring twice before the trigger
    capture(CH_I, 0, 16, 3, 0);     // no pre-trigger history, whole buffer
    capture(CH_Q, 15, 16, 20, 0);   // maximum pre-trigger history
    // done: the writer stops writing but keeps draining
    nq0 = writes;
    repeat (20) @(posedge clk);
    checks++;
    if (writes != nq0 || state != ACQ_DONE) begin failures++; $display("writes after done"); end
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
