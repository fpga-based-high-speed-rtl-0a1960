// adc_pulse_model: behavioural model (not synthesizable) of one ADC channel
// in 1:2 demux, non-DES mode, digitizing detector pulses, together with the
// discriminator that raises the card's TTL trigger.
//
// The channel sits at BASELINE. When `fire` rises, a pulse starts at the next
// sample: a linear rise over RISE samples to BASELINE + amp, then an
// exponential decay with time constant TAU samples (a charge-preamplifier
// shape). DISC_DELAY after the pulse starts the trigger output goes high for
// TRIG_WIDTH, as a threshold discriminator fed by the same signal would.
// Every sample sent is kept in `hist`, indexed by sample number, and the
// number of the first sample of the latest pulse is given in `pulse_start`,
// so a receiver can compare a record with what was sent.
//
// Output timing is as in adc12d1000_model: each DCLK edge carries two
// samples, the older on the delayed bus dd and the newer on the direct bus
// d, changing a quarter period after the edge. 1 GS/s for HALF_PERIOD 2 ns.
`timescale 1ns/1ps
module adc_pulse_model #(
  parameter realtime HALF_PERIOD = 2.0ns,
  parameter int      BASELINE    = 200,
  parameter int      RISE        = 20,
  parameter real     TAU         = 150.0,
  parameter realtime DISC_DELAY  = 50ns,
  parameter realtime TRIG_WIDTH  = 100ns
) (
  input  logic        fire,
  input  int          amp,
  output logic        dclk_p,
  output logic        dclk_n,
  output logic [11:0] d,
  output logic [11:0] dd,
  output logic        trig,
  output int unsigned pulse_start
);
  logic [11:0] hist [$];
  int unsigned n = 0;
  longint      t0 = -1_000_000;     // start of the latest pulse
  int          a  = 0;

  function automatic logic [11:0] value(input longint m, input int pamp);
    real v;
    if (m < 0)              v = 0.0;
    else if (m < RISE)      v = real'(pamp) * real'(m + 1) / real'(RISE);
    else                    v = real'(pamp) * $exp(-real'(m - RISE + 1) / TAU);
    return 12'($rtoi($floor(v + 0.5)) + BASELINE);
  endfunction

  always @(posedge fire) begin
    t0 = longint'(n) + 2;            // first sample of the next edge
    a  = amp;
    pulse_start = 32'(t0);
    #(DISC_DELAY) trig = 1'b1;
    #(TRIG_WIDTH) trig = 1'b0;
  end

  initial begin
    dclk_p = 1'b0;
    trig = 1'b0;
    pulse_start = 0;
    dd = 12'(BASELINE);
    d  = 12'(BASELINE);
    forever begin
      #(HALF_PERIOD / 2.0);
      dd = value(longint'(n) - t0, a);
      d  = value(longint'(n) + 1 - t0, a);
      hist.push_back(dd);
      hist.push_back(d);
      n += 2;
      #(HALF_PERIOD / 2.0);
      dclk_p = ~dclk_p;
    end
  end
  assign dclk_n = ~dclk_p;
endmodule
