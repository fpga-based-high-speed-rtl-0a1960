// tb_daq_card_full: end-to-end test of the card design with every parameter
// at its default (2 GB DDR2 buffer, 64-word FIFOs). The ring cannot be
// wrapped at this size, so that one mechanism is not required; see
// daq_card_harness for the sequence and the checks.
`timescale 1ns/1ps
module tb_daq_card_full;
  import daq_pkg::*;
  import llrf_pkg::*;
  localparam int unsigned AW = daq_pkg::ADDR_W;
  `include "daq_card_ports.svh"
  daq_card_top dut (.*);
  daq_card_harness #(.AW(AW), .RING_WRAP(1'b0)) harness (.*);
endmodule
