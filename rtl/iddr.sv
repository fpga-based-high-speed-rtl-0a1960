// iddr: input double-data-rate register, the FPGA I/O primitive that turns a
// DDR bus from the ADC into two single-data-rate buses.
//
// D is captured by two registers: Q0 on the rising edge of C0 and Q1 on the
// rising edge of C1, where C1 is the complement of C0 (the two legs of the
// ADC's differential DCLK). Each output therefore holds a value for a full
// clock period and runs at half the rate of D, as in the opposite-edge timing
// of the primitive. The register structure and the C0/C1/Q0/Q1 names follow
// the primitive's diagram; the synchronous reset (seen on each clock) is
// this design's own addition.
//
// Timing: Q0 changes one C0 edge after D is valid, Q1 one C1 edge after.
// A consumer clocked on C0 sees, at each C0 rising edge, the pair (Q0, Q1)
// = (sample taken at the previous C0 edge, sample taken at the C1 edge in
// between), i.e. two consecutive samples in time order.
module iddr #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             c0,
  input  logic             c1,
  input  logic             rst,   // synchronous, active high
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q0,
  output logic [WIDTH-1:0] q1
);
  always_ff @(posedge c0)
    if (rst) q0 <= '0;
    else     q0 <= d;

  always_ff @(posedge c1)
    if (rst) q1 <= '0;
    else     q1 <= d;
endmodule
