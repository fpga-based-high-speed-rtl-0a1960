// pmc: phase and magnitude comparator of the LLRF controller.
//
// From the baseband I/Q samples it measures the phase and magnitude of the
// cavity signal and compares them with the known good phase and magnitude:
//   phase_shift = good_phase - atan2(Q, I)          (2^32 = 360 degrees)
//   scale_fact  = good_mag / |I + jQ|               (s1.14, 16384 = 1.0)
// Phase and magnitude come from a pipelined CORDIC in vectoring mode whose
// rotation angles are read from an arctangent look-up table,
//   ATAN[i] = round(atan(2^-i) / (2*pi) * 2^32),  i = 0 .. ITER-1,
// after a pre-rotation by 180 degrees for vectors in the left half-plane.
// The inputs are scaled by 2^4 inside the CORDIC to keep truncation errors
// below one input LSB.
// The CORDIC gain is removed by multiplying by round(2^16 / 1.6467602) =
// 39797. The ratio uses a pipelined restoring divider, one quotient bit per
// stage; it saturates at 32767 (just under 2.0) when good_mag >= 2*|I+jQ|,
// including a zero magnitude. The document names the comparison, the
// look-up-table approach and the output formats; the CORDIC, the divider and
// the exact definitions above are this design's.
//
// The quotient is never negative, so bit 15 of scale_fact is always 0.
//
// Timing: fully pipelined, one result per clock. Both outputs have the
// latency LATENCY = ITER + 19 clocks (35 with ITER = 16) from i_in/q_in.
// good_phase and good_mag are set-points and are sampled at the end of the
// CORDIC.
module pmc
  import llrf_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic         clk,
  input  logic         rst,         // synchronous, active high
  input  iq_t          i_in,
  input  iq_t          q_in,
  input  phase_t       good_phase,
  input  logic [15:0]  good_mag,    // same units as |I + jQ|
  output phase_t       phase_shift,
  output scale_t       scale_fact
);
  localparam int unsigned LATENCY = ITER + 19;
  localparam int unsigned G    = 4;             // fractional guard bits
  localparam int unsigned XW   = IQ_W + 3 + G;  // room for sqrt(2) * 1.65
  localparam int unsigned QB   = SCALE_W - 1;   // quotient bits: 15
  localparam int unsigned NUMW = 16 + SCALE_FRAC + 1;
  localparam logic [15:0] INV_GAIN = 16'd39797;

  typedef phase_t atan_tab_t [ITER];
  function automatic atan_tab_t gen_atan();
    atan_tab_t r;
    for (int i = 0; i < int'(ITER); i++)
      r[i] = PHASE_W'(longint'($floor($atan(2.0 ** (-i)) / (2.0 * PI) * 4294967296.0 + 0.5)));
    return r;
  endfunction
  localparam atan_tab_t ATAN = gen_atan();

  // ---------------- CORDIC ----------------
  logic signed [XW-1:0] cx [ITER+1];
  logic signed [XW-1:0] cy [ITER+1];
  phase_t               cz [ITER+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cx[0] <= '0; cy[0] <= '0; cz[0] <= '0;
    end else if (i_in < 0) begin
      cx[0] <= -(XW'(i_in) <<< G); cy[0] <= -(XW'(q_in) <<< G); cz[0] <= 32'h8000_0000;
    end else begin
      cx[0] <=  XW'(i_in) <<< G;  cy[0] <=  XW'(q_in) <<< G; cz[0] <= '0;
    end
  end

  for (genvar i = 0; i < int'(ITER); i++) begin : g_cordic
    always_ff @(posedge clk) begin
      if (rst) begin
        cx[i+1] <= '0; cy[i+1] <= '0; cz[i+1] <= '0;
      end else if (cy[i] > 0) begin
        cx[i+1] <= cx[i] + (cy[i] >>> i);
        cy[i+1] <= cy[i] - (cx[i] >>> i);
        cz[i+1] <= cz[i] + ATAN[i];
      end else begin
        cx[i+1] <= cx[i] - (cy[i] >>> i);
        cy[i+1] <= cy[i] + (cx[i] >>> i);
        cz[i+1] <= cz[i] - ATAN[i];
      end
    end
  end

  // ---------------- gain correction, phase difference ----------------
  logic [XW-1:0]        mag;
  phase_t               dphase;
  logic [XW+16-1:0]     mag_prod;

  always_comb mag_prod = (XW+16)'(unsigned'(cx[ITER])) * (XW+16)'(INV_GAIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      mag    <= '0;
      dphase <= '0;
    end else begin
      mag    <= XW'(mag_prod >> (16 + G));
      dphase <= good_phase - cz[ITER];
    end
  end

  // ---------------- divider: (good_mag << 14) / mag ----------------
  logic [NUMW-1:0] rem  [QB+1];
  logic [XW-1:0]   den  [QB+1];
  logic [QB-1:0]   quo  [QB+1];
  logic            sat  [QB+1];
  phase_t          ph_d [QB+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      rem[0] <= '0; den[0] <= '0; quo[0] <= '0; sat[0] <= 1'b0; ph_d[0] <= '0;
    end else begin
      rem[0]  <= NUMW'(good_mag) << SCALE_FRAC;
      den[0]  <= mag;
      quo[0]  <= '0;
      sat[0]  <= (mag == 0) || ((XW+1)'(good_mag) >= ((XW+1)'(mag) << 1));
      ph_d[0] <= dphase;
    end
  end

  for (genvar s = 0; s < int'(QB); s++) begin : g_div
    localparam int unsigned B = QB - 1 - s;       // quotient bit of this stage
    logic [NUMW+XW-1:0] trial;
    always_comb trial = (NUMW+XW)'(den[s]) << B;
    always_ff @(posedge clk) begin
      if (rst) begin
        rem[s+1] <= '0; den[s+1] <= '0; quo[s+1] <= '0; sat[s+1] <= 1'b0; ph_d[s+1] <= '0;
      end else begin
        den[s+1]  <= den[s];
        sat[s+1]  <= sat[s];
        ph_d[s+1] <= ph_d[s];
        if ((NUMW+XW)'(rem[s]) >= trial) begin
          rem[s+1] <= NUMW'((NUMW+XW)'(rem[s]) - trial);
          quo[s+1] <= quo[s] | (QB'(1) << B);
        end else begin
          rem[s+1] <= rem[s];
          quo[s+1] <= quo[s];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_shift <= '0;
      scale_fact  <= '0;
    end else begin
      phase_shift <= ph_d[QB];
      scale_fact  <= sat[QB] ? scale_t'(16'sh7FFF) : scale_t'({1'b0, quo[QB]});
    end
  end
endmodule
