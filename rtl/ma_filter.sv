// ma_filter: 16-tap moving-average loop filter (MA_CUSTOM).
//
// Smooths the phase_shift and scale_fact corrections so that the output DDS
// never sees an abrupt step, which could make the loop unstable; it also acts
// as a low-pass filter. y = (x[n] + ... + x[n-15]) / 16, computed with a
// running sum: add the new sample, subtract the one that leaves the window.
// The 16 taps are the document's. Inputs are treated as two's complement, so
// a 32-bit phase is averaged as a signed angle in [-180, +180) degrees; this
// keeps a phase that wanders around 0 degrees from averaging to 180. After
// reset the window holds zeros. The division truncates toward minus infinity.
//
// Timing: one sample per clock; dout is registered, so a step on din shows
// in dout one clock later and reaches its full value after TAPS clocks.
module ma_filter #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned TAPS  = 16     // power of two
) (
  input  logic                    clk,
  input  logic                    rst,  // synchronous, active high
  input  logic signed [WIDTH-1:0] din,
  output logic signed [WIDTH-1:0] dout
);
  localparam int unsigned LOG2 = $clog2(TAPS);
  localparam int unsigned SW   = WIDTH + LOG2;

  logic signed [WIDTH-1:0] win [TAPS];
  logic signed [SW-1:0]    sum, sum_next;

  always_comb sum_next = sum + SW'(din) - SW'(win[TAPS-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      win  <= '{default: '0};
      sum  <= '0;
      dout <= '0;
    end else begin
      win[0] <= din;
      for (int k = 1; k < int'(TAPS); k++) win[k] <= win[k-1];
      sum  <= sum_next;
      dout <= WIDTH'(sum_next >>> LOG2);
    end
  end
endmodule
