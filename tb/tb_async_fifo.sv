// tb_async_fifo: writes numbered words on one clock and reads them on an
// unrelated clock with random enables, checking order, the full and empty
// flags against a reference count, the write-side fill level bound, and the
// sticky overflow flag when a write hits a full FIFO.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 128, D = 64;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0, rd_en = 0, wr_full, rd_empty, wr_overflow;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] wr_count;
  int checks = 0, failures = 0;
  int unsigned wr_n = 0, rd_n = 0;
  int phase = 0;          // 0: random, 1: fill up, 2: drain
  int saw_full = 0, saw_empty = 0;

  always #3.1 wclk = ~wclk;
  always #4.3 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data, .wr_full, .wr_count, .wr_overflow,
    .rd_clk(rclk), .rd_rst(rrst), .rd_en, .rd_data, .rd_empty
  );

  function automatic logic [W-1:0] val(input int unsigned k);
    return {k, ~k, k * 32'd2654435761, k ^ 32'h5a5a_5a5a};
  endfunction

  // write side
  always @(posedge wclk) begin
    if (!wrst) begin
      if (wr_en && !wr_full) wr_n++;
      checks++;
      if (wr_count > D || (wr_n - rd_n) > D) begin failures++; $display("fill level beyond depth"); end
      if (wr_full) saw_full++;
    end
    #0.1;
    wr_en   = (phase == 0) ? ($urandom_range(0, 2) != 0) && !wr_full : (phase == 1);
    wr_data = val(wr_n);
    if (phase == 1) wr_en = !wr_full;   // fill exactly up to full
  end

  // read side
  always @(posedge rclk) begin
    if (!rrst && rd_en && !rd_empty) rd_n++;
    if (!rrst && rd_empty) saw_empty++;
    #0.1;
    rd_en = (phase == 2) ? 1'b1 : (phase == 0) ? ($urandom_range(0, 1) == 1) : 1'b0;
    rd_en = rd_en && !rd_empty;
    if (rd_en) begin
      checks++;
      if (rd_data !== val(rd_n)) begin failures++; $display("word %0d wrong", rd_n); end
    end
  end

  initial begin
    repeat (4) @(posedge rclk);
    wrst = 0; rrst = 0;
    repeat (3000) @(posedge wclk);
    phase = 1;                               // stop reading, fill
    repeat (200) @(posedge wclk);
    checks++;
    if (!wr_full || wr_n - rd_n != D) begin failures++; $display("not full after filling: %0d", wr_n - rd_n); end
    checks++;
    if (wr_overflow) begin failures++; $display("overflow set too early"); end
    // one write into the full FIFO must be dropped and flagged
    @(negedge wclk); wr_en = 1; phase = 3;
    @(posedge wclk); #0.2 wr_en = 0;
    checks++;
    if (!wr_overflow) begin failures++; $display("overflow not flagged"); end
    phase = 2;                               // drain
    repeat (200) @(posedge rclk);
    checks++;
    if (!rd_empty || rd_n != wr_n) begin failures++; $display("not drained: %0d/%0d", rd_n, wr_n); end
    checks++;
    if (saw_full == 0 || saw_empty == 0) begin failures++; $display("flags never seen"); end
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
