// sample_packer: rearranges and concatenates the samples of one ADC channel
// into 128-bit words for the DDR2 write path.
//
// In 1:2 demux non-DES mode the ADC sends each channel on two 12-bit DDR
// buses, the direct bus (I) and the delayed bus (Id). After the two IDDRs of
// a bus, every DCLK cycle brings four samples. This design takes their time
// order as Id.q0, I.q0, Id.q1, I.q1 (oldest first). Each sample is zero-padded
// at the MSB end to a 16-bit lane, and two consecutive cycles (eight lanes)
// form one 128-bit word with the oldest sample in bits [15:0]. The padding and
// the 128-bit width follow the data-path diagram; the sample order and lane
// order are this design's choice.
//
// Interface: runs on the channel's DCLK (C0). While en is high it consumes
// one quad per cycle; word_valid pulses for one cycle every second cycle with
// the completed word. Dropping en restarts word alignment. Latency: the word
// appears one cycle after its second quad is taken.
module sample_packer
  import daq_pkg::*;
(
  input  logic    clk,
  input  logic    rst,        // synchronous, active high
  input  logic    en,
  input  sample_t i_q0,       // direct bus, rising-edge capture
  input  sample_t i_q1,       // direct bus, falling-edge capture
  input  sample_t id_q0,      // delayed bus, rising-edge capture
  input  sample_t id_q1,      // delayed bus, falling-edge capture
  output word_t   word,
  output logic    word_valid
);
  localparam int unsigned HALF_W = WORD_W / 2;

  logic              second;  // next quad completes a word
  logic [HALF_W-1:0] first_half;
  logic [HALF_W-1:0] quad;

  function automatic lane_t pad(input sample_t s);
    return {{(LANE_W-SAMPLE_W){1'b0}}, s};
  endfunction

  always_comb quad = {pad(i_q1), pad(id_q1), pad(i_q0), pad(id_q0)};

  always_ff @(posedge clk) begin
    if (rst) begin
      second     <= 1'b0;
      first_half <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (!en) begin
        second <= 1'b0;
      end else if (!second) begin
        first_half <= quad;
        second     <= 1'b1;
      end else begin
        word       <= {quad, first_half};
        word_valid <= 1'b1;
        second     <= 1'b0;
      end
    end
  end
endmodule
