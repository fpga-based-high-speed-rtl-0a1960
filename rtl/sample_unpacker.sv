// sample_unpacker: turns 128-bit DDR2 words back into the sample stream for
// the cPCI interface.
//
// Each 128-bit word holds eight 16-bit sample lanes, oldest in bits [15:0].
// The unpacker takes the words from FIFO_DDR and sends four 32-bit beats per
// word, each the concatenation of two consecutive 16-bit samples with the
// older sample in bits [15:0]. The 16 + 16 = 32 concatenation follows the
// data-path diagram; the lane order and the valid/ready handshake on the
// output are this design's own.
//
// Interface: show-ahead FIFO read port in; out_valid/out_ready stream out.
// Throughput is one 32-bit beat per clock; the FIFO is popped together with
// the last beat of a word, so there is no bubble between words.
module sample_unpacker
  import daq_pkg::*;
(
  input  logic             clk,
  input  logic             rst,          // synchronous, active high
  input  word_t            fifo_data,
  input  logic             fifo_empty,
  output logic             fifo_rd,
  output logic [OUT_W-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);
  localparam int unsigned BEATS = WORD_W / OUT_W;   // 4
  logic [$clog2(BEATS)-1:0] beat;

  always_comb begin
    out_valid = !fifo_empty;
    out_data  = fifo_data[beat*OUT_W +: OUT_W];
    fifo_rd   = out_valid && out_ready && (beat == $clog2(BEATS)'(BEATS - 1));
  end

  always_ff @(posedge clk) begin
    if (rst)                        beat <= '0;
    else if (out_valid && out_ready) beat <= beat + 1'b1;
  end

  assert property (@(posedge clk) disable iff (rst)
                   out_valid && !out_ready |=> out_valid && $stable(out_data))
    else $error("sample_unpacker: output beat changed before acceptance");
endmodule
