// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Used three times in the acquisition path: FIFO_I and FIFO_Q carry 128-bit
// sample words from each ADC channel clock into the memory clock, and FIFO_DDR
// carries 128-bit words read from DDR2 into the cPCI clock. The default size,
// 64 words of 128 bits, is the one printed for FIFO_I/FIFO_Q; the dual-clock
// construction, the show-ahead read port and the overflow flag are this
// design's choices.
//
// Each side keeps a binary pointer one bit wider than the address and passes
// its Gray-coded copy to the other side through a two-flop synchronizer. Full
// and the write-side fill level are therefore pessimistic by the
// synchronizer delay, never optimistic; likewise empty on the read side.
//
// Interface: wr_en while wr_full is ignored and sets the sticky wr_overflow
// flag (cleared by wr_rst). rd_data shows the head word whenever rd_empty is
// low; rd_en pops it. wr_count is the write side's view of the fill level.
module async_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 64     // power of two
) (
  input  logic                     wr_clk,
  input  logic                     wr_rst,   // synchronous to wr_clk
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     wr_full,
  output logic [$clog2(DEPTH):0]   wr_count,
  output logic                     wr_overflow,
  input  logic                     rd_clk,
  input  logic                     rd_rst,   // synchronous to rd_clk
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wr_bin, wr_gray, rd_gray_s1, rd_gray_s2;
  ptr_t rd_bin, rd_gray, wr_gray_s1, wr_gray_s2;
  ptr_t rd_bin_w;  // read pointer as seen on the write side

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  always_comb begin
    rd_bin_w = gray2bin(rd_gray_s2);
    wr_count = wr_bin - rd_bin_w;
    wr_full  = (wr_gray == {~rd_gray_s2[AW:AW-1], rd_gray_s2[AW-2:0]});
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_bin      <= '0;
      wr_gray     <= '0;
      rd_gray_s1  <= '0;
      rd_gray_s2  <= '0;
      wr_overflow <= 1'b0;
    end else begin
      rd_gray_s1 <= rd_gray;
      rd_gray_s2 <= rd_gray_s1;
      if (wr_en && !wr_full) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
      if (wr_en && wr_full) wr_overflow <= 1'b1;
    end
  end

  always_ff @(posedge wr_clk)
    if (wr_en && !wr_full) mem[wr_bin[AW-1:0]] <= wr_data;

  // ---------------- read side ----------------
  always_comb begin
    rd_empty = (rd_gray == wr_gray_s2);
    rd_data  = mem[rd_bin[AW-1:0]];
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_s1 <= '0;
      wr_gray_s2 <= '0;
    end else begin
      wr_gray_s1 <= wr_gray;
      wr_gray_s2 <= wr_gray_s1;
      if (rd_en && !rd_empty) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

  // A pop of an empty FIFO is a protocol error of the reader.
  assert property (@(posedge rd_clk) disable iff (rd_rst) !(rd_en && rd_empty))
    else $error("async_fifo: read while empty");
endmodule
