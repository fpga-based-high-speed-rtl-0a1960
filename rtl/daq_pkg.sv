// daq_pkg: widths and types shared by the acquisition data path.
// The ADC delivers 12-bit samples; each is zero-padded to a 16-bit lane so that
// eight lanes fill one 128-bit word, the user data width of the DDR2 memory
// controller. The capture buffer is 2 GB, i.e. 2^27 words of 128 bits.
package daq_pkg;
  localparam int unsigned SAMPLE_W = 12;   // ADC resolution
  localparam int unsigned LANE_W   = 16;   // sample lane after zero padding
  localparam int unsigned WORD_W   = 128;  // DDR2 user data word
  localparam int unsigned LANES    = WORD_W / LANE_W;  // 8 samples per word
  localparam int unsigned OUT_W    = 32;   // cPCI data width
  localparam int unsigned ADDR_W   = 27;   // 2 GB / 16 B per word

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [LANE_W-1:0]   lane_t;
  typedef logic [WORD_W-1:0]   word_t;

  typedef enum logic {CH_I = 1'b0, CH_Q = 1'b1} ch_sel_e;

  typedef enum logic [1:0] {
    ACQ_IDLE  = 2'd0,   // not capturing; FIFOs are drained and discarded
    ACQ_ARMED = 2'd1,   // ring-buffer writing, waiting for the trigger
    ACQ_POST  = 2'd2,   // trigger seen, writing the post-trigger words
    ACQ_DONE  = 2'd3    // record complete, start address valid
  } acq_state_e;
endpackage
