// adc12d1000_model: behavioural model (not synthesizable) of the digital
// outputs of one channel of the dual 12-bit ADC in 1:2 demux, non-DES mode.
//
// The channel's samples are numbered n = 0, 1, 2, ... and the value of
// sample n is start + step*n (mod 4096), so a receiver can check order and
// completeness. Each DCLK edge, rising and falling, carries two samples:
// the delayed bus dd the older one, the direct bus d the newer one. Data
// change a quarter period after each edge, so they are centred on the edges
// as the converter's source-synchronous LVDS outputs are. DCLK runs at a
// quarter of the per-channel sample rate (250 MHz for 1 GS/s).
`timescale 1ns/1ps
module adc12d1000_model #(
  parameter realtime HALF_PERIOD = 2.0ns,
  parameter realtime SKEW        = 0.0ns,
  parameter int      START       = 0,
  parameter int      STEP        = 1
) (
  input  logic        run,
  output logic        dclk_p,
  output logic        dclk_n,
  output logic [11:0] d,
  output logic [11:0] dd,
  output int unsigned samples_sent
);
  int unsigned n = 0;

  initial begin
    dclk_p = 1'b0;
    d  = 12'(START + STEP);
    dd = 12'(START);
    samples_sent = 0;
    #(SKEW);
    forever begin
      #(HALF_PERIOD / 2.0);
      if (run) begin
        dd = 12'(START + STEP * int'(n));
        d  = 12'(START + STEP * int'(n + 1));
        n += 2;
        samples_sent = n;
      end
      #(HALF_PERIOD / 2.0);
      dclk_p = ~dclk_p;
    end
  end
  assign dclk_n = ~dclk_p;
endmodule
