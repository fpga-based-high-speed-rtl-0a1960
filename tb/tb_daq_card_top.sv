// tb_daq_card_top: end-to-end test of the card design with a 256-word DDR2
// ring (AW = 8) so that the ring buffer wraps; see daq_card_harness for the
// sequence and the checks.
`timescale 1ns/1ps
module tb_daq_card_top;
  import daq_pkg::*;
  import llrf_pkg::*;
  localparam int unsigned AW = 8;
  `include "daq_card_ports.svh"
  daq_card_top #(.AW(AW)) dut (.*);
  daq_card_harness #(.AW(AW), .RING_WRAP(1'b1)) harness (.*);
endmodule
