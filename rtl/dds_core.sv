// dds_core: direct digital synthesizer with a 12-bit sine look-up table.
//
// A 32-bit phase accumulator advances by phase_inc every clock, so the output
// frequency is phase_inc / 2^32 * Fs. phase_shift (2^32 = 360 degrees) is
// added to the accumulator, and the top 12 bits of the sum address the sine
// table. Only a quarter period is stored (llrf_pkg::SIN_QTR); the quadrant
// bits mirror the address and negate the result. The cosine output uses the
// same table a quarter period ahead. The 12-bit LUT, the programmable
// phase_inc and the 32-bit phase_shift are from the document; the
// quarter-wave table, the 16-bit amplitude and the pipeline are this
// design's choices.
//
// Timing: three register stages. A change of phase_shift reaches sin_out and
// cos_out three clocks later; a change of phase_inc one clock after that.
// Full scale is +/-32767.
module dds_core
  import llrf_pkg::*;
(
  input  logic   clk,
  input  logic   rst,          // synchronous, active high; clears the phase
  input  phase_t phase_inc,
  input  phase_t phase_shift,
  output amp_t   sin_out,
  output amp_t   cos_out
);
  localparam int unsigned QW = LUT_AW - 2;

  phase_t               acc;
  logic [LUT_AW-1:0]    phase;   // top bits of accumulator + shift
  logic [LUT_AW-1:0]    s_addr, c_addr;
  logic [AMP_W-2:0]     s_mag, c_mag;
  logic                 s_neg, c_neg;

  function automatic logic [QW-1:0] qtr_index(input logic [LUT_AW-1:0] a);
    return a[LUT_AW-2] ? ~a[QW-1:0] : a[QW-1:0];   // mirror in quadrants 1, 3
  endfunction

  always_comb begin
    s_addr = phase;
    c_addr = s_addr + LUT_AW'(QTR);                  // cos(x) = sin(x + 90 deg)
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      phase   <= '0;
      s_mag   <= '0;
      c_mag   <= '0;
      s_neg   <= 1'b0;
      c_neg   <= 1'b0;
      sin_out <= '0;
      cos_out <= '0;
    end else begin
      acc     <= acc + phase_inc;
      phase   <= LUT_AW'((acc + phase_shift) >> (PHASE_W - LUT_AW));
      s_mag   <= SIN_QTR[qtr_index(s_addr)];
      c_mag   <= SIN_QTR[qtr_index(c_addr)];
      s_neg   <= s_addr[LUT_AW-1];                   // quadrants 2, 3 negative
      c_neg   <= c_addr[LUT_AW-1];
      sin_out <= s_neg ? -amp_t'({1'b0, s_mag}) : amp_t'({1'b0, s_mag});
      cos_out <= c_neg ? -amp_t'({1'b0, c_mag}) : amp_t'({1'b0, c_mag});
    end
  end
endmodule
