// acq_reader: reads a captured record back from DDR2 into FIFO_DDR.
//
// After a capture the record lies in DDR2 as rec_words consecutive 128-bit
// words starting at rec_addr, wrapping at the end of the buffer. On start the
// reader issues one read command per word, in order, and writes each word
// returned by the memory into FIFO_DDR, from where the slower cPCI side takes
// it. The memory returns read data in order and cannot be stalled, so the
// reader only issues a command when FIFO_DDR has room for that word and all
// words still in flight: fill level (write-side view) + in flight < depth.
// The document gives the read step and FIFO_DDR; the credit scheme and the
// port protocol are this design's own.
//
// Interface: start is a one-cycle pulse, ignored while busy. rd_valid/
// rd_ready is the command handshake; rdata_valid marks returned data. busy is
// high from start until the last word has been written into FIFO_DDR.
module acq_reader
  import daq_pkg::*;
#(
  parameter int unsigned AW         = daq_pkg::ADDR_W,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                        clk,
  input  logic                        rst,          // synchronous, active high
  input  logic                        start,
  input  logic [AW-1:0]               rec_addr,
  input  logic [AW:0]                 rec_words,
  // memory read port
  output logic                        rd_valid,
  input  logic                        rd_ready,
  output logic [AW-1:0]               rd_addr,
  input  logic                        rdata_valid,
  input  word_t                       rdata,
  // FIFO_DDR write port
  output logic                        fifo_wr_en,
  output word_t                       fifo_wr_data,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_wr_count,
  // status
  output logic                        busy,
  output logic [31:0]                 credit_stalls  // cycles a command waited for FIFO room
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic [AW:0]   to_issue;
  logic [CW-1:0] in_flight;
  logic          room, issue;

  always_comb begin
    room         = (CW+1)'(fifo_wr_count) + (CW+1)'(in_flight) < (CW+1)'(FIFO_DEPTH);
    rd_valid     = busy && (to_issue != 0) && room;
    issue        = rd_valid && rd_ready;
    fifo_wr_en   = rdata_valid;
    fifo_wr_data = rdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy          <= 1'b0;
      to_issue      <= '0;
      in_flight     <= '0;
      rd_addr       <= '0;
      credit_stalls <= '0;
    end else begin
      if (!busy) begin
        if (start) begin
          busy     <= (rec_words != 0);
          to_issue <= rec_words;
          rd_addr  <= rec_addr;
        end
      end else begin
        if (issue) begin
          to_issue <= to_issue - 1'b1;
          rd_addr  <= rd_addr + 1'b1;
        end
        in_flight <= in_flight + CW'(issue) - CW'(rdata_valid);
        if (to_issue != 0 && !room) credit_stalls <= credit_stalls + 1'b1;
        if (to_issue == 0 && in_flight == 0 && !rdata_valid) busy <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) rdata_valid |-> in_flight != 0)
    else $error("acq_reader: read data without an outstanding command");
endmodule
