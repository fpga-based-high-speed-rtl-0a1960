// daq_card_top: FPGA design of the high-speed data acquisition card.
//
// Two designs share the card and stand side by side here.
//
// 1. Acquisition path. The dual 12-bit ADC runs in 1:2 demux non-DES mode:
//    each channel (I and Q) arrives on a direct and a delayed 12-bit DDR bus
//    with its own DCLK, at 250 MHz for 1 GS/s per channel. Four iddr blocks
//    turn the DDR buses into SDR pairs; per channel a sample_packer orders
//    and zero-pads the four samples of each DCLK cycle and builds 128-bit
//    words, which cross into the memory clock through FIFO_I and FIFO_Q
//    (async_fifo, 64 x 128). acq_writer selects one channel and writes it
//    into the DDR2 buffer as a ring with a programmable pre-trigger history;
//    after the capture acq_reader reads the record back through FIFO_DDR
//    (async_fifo) into the cPCI clock domain, where sample_unpacker sends it
//    as 32-bit beats of two 16-bit samples.
// 2. LLRF controller (llrf_top) on its own 250 MHz sample clock and its own
//    ADC input and DAC output ports.
//
// External parts are outside: the DDR2 memory controller (a simple command
// port is brought out: one 128-bit word per command, reads returned in order
// without back-pressure), the cPCI bridge (a 32-bit valid/ready stream plus
// the control and status signals it would reach through its local bus), the
// DAC and the clock synthesizer. The block structure, widths and FIFO sizes
// follow the data-path diagram; the control interface, the memory port and
// the clocking of the FIFOs are this design's own.
//
// Resets: adc_rst, mem_rst, pci_rst and llrf_rst must each be held for a few
// cycles of every clock that uses them; the FIFO pointers reset on both sides.
module daq_card_top
  import daq_pkg::*;
  import llrf_pkg::*;
#(
  parameter int unsigned AW         = daq_pkg::ADDR_W,  // DDR2 word address width
  parameter int unsigned FIFO_DEPTH = 64
) (
  // ADC ports (LVDS receivers outside)
  input  logic             adc_rst,
  input  logic             dclki_p, dclki_n,
  input  sample_t          adc_di, adc_did,
  input  logic             dclkq_p, dclkq_n,
  input  sample_t          adc_dq, adc_dqd,
  // memory clock domain: control, status, memory command port
  input  logic             mem_clk,
  input  logic             mem_rst,
  input  logic             arm,
  input  ch_sel_e          ch_sel,
  input  logic [AW:0]      pretrig_words,
  input  logic [AW:0]      capture_words,
  input  logic             trigger,
  input  logic             read_start,
  output acq_state_e       acq_state,
  output logic             acq_done,
  output logic [AW-1:0]    rec_addr,
  output logic [AW-1:0]    trig_addr,
  output logic [15:0]      early_trig_count,
  output logic             read_busy,
  output logic [31:0]      read_credit_stalls,
  output logic             mem_cmd_valid,
  input  logic             mem_cmd_ready,
  output logic             mem_cmd_we,
  output logic [AW-1:0]    mem_cmd_addr,
  output word_t            mem_wdata,
  input  logic             mem_rdata_valid,
  input  word_t            mem_rdata,
  output logic             fifo_i_overflow,   // sticky, DCLKI domain
  output logic             fifo_q_overflow,   // sticky, DCLKQ domain
  // cPCI clock domain: sample stream
  input  logic             pci_clk,
  input  logic             pci_rst,
  output logic [OUT_W-1:0] pci_data,
  output logic             pci_valid,
  input  logic             pci_ready,
  // LLRF controller
  input  logic             llrf_clk,
  input  logic             llrf_rst,
  input  adc_t             llrf_adc_in,
  input  phase_t           ddc_phase_inc,
  input  phase_t           dds_phase_inc,
  input  phase_t           good_phase,
  input  logic [15:0]      good_mag,
  output iq_t              llrf_i,
  output iq_t              llrf_q,
  output correction_t      llrf_corr,
  output correction_t      llrf_corr_avg,
  output amp_t             dac_out
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- capture front end, one set per channel ----------------
  sample_t i_q0, i_q1, id_q0, id_q1, q_q0, q_q1, qd_q0, qd_q1;
  word_t   word_i, word_q;
  logic    word_i_valid, word_q_valid;

  iddr #(.WIDTH(SAMPLE_W)) u_iddr_i  (.c0(dclki_p), .c1(dclki_n), .rst(adc_rst), .d(adc_di),  .q0(i_q0),  .q1(i_q1));
  iddr #(.WIDTH(SAMPLE_W)) u_iddr_id (.c0(dclki_p), .c1(dclki_n), .rst(adc_rst), .d(adc_did), .q0(id_q0), .q1(id_q1));
  iddr #(.WIDTH(SAMPLE_W)) u_iddr_q  (.c0(dclkq_p), .c1(dclkq_n), .rst(adc_rst), .d(adc_dq),  .q0(q_q0),  .q1(q_q1));
  iddr #(.WIDTH(SAMPLE_W)) u_iddr_qd (.c0(dclkq_p), .c1(dclkq_n), .rst(adc_rst), .d(adc_dqd), .q0(qd_q0), .q1(qd_q1));

  sample_packer u_pack_i (
    .clk(dclki_p), .rst(adc_rst), .en(1'b1),
    .i_q0, .i_q1, .id_q0, .id_q1, .word(word_i), .word_valid(word_i_valid)
  );
  sample_packer u_pack_q (
    .clk(dclkq_p), .rst(adc_rst), .en(1'b1),
    .i_q0(q_q0), .i_q1(q_q1), .id_q0(qd_q0), .id_q1(qd_q1), .word(word_q), .word_valid(word_q_valid)
  );

  // ---------------- FIFO_I, FIFO_Q ----------------
  word_t fi_data, fq_data;
  logic  fi_empty, fq_empty, fi_rd, fq_rd;
  logic  fi_full, fq_full;
  logic [CW-1:0] fi_count, fq_count;

  async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_i (
    .wr_clk(dclki_p), .wr_rst(adc_rst), .wr_en(word_i_valid), .wr_data(word_i),
    .wr_full(fi_full), .wr_count(fi_count), .wr_overflow(fifo_i_overflow),
    .rd_clk(mem_clk), .rd_rst(mem_rst), .rd_en(fi_rd), .rd_data(fi_data), .rd_empty(fi_empty)
  );
  async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_q (
    .wr_clk(dclkq_p), .wr_rst(adc_rst), .wr_en(word_q_valid), .wr_data(word_q),
    .wr_full(fq_full), .wr_count(fq_count), .wr_overflow(fifo_q_overflow),
    .rd_clk(mem_clk), .rd_rst(mem_rst), .rd_en(fq_rd), .rd_data(fq_data), .rd_empty(fq_empty)
  );

  // ---------------- DDR2 write and read controllers ----------------
  logic          w_valid, w_ready, r_valid, r_ready;
  logic [AW-1:0] w_addr, r_addr;
  word_t         w_data;
  logic          fd_wr_en;
  word_t         fd_wr_data;
  logic          fd_full;
  logic [CW-1:0] fd_count;

  acq_writer #(.AW(AW)) u_writer (
    .clk(mem_clk), .rst(mem_rst), .arm, .ch_sel, .pretrig_words, .capture_words, .trigger,
    .fifo_i_data(fi_data), .fifo_i_empty(fi_empty), .fifo_i_rd(fi_rd),
    .fifo_q_data(fq_data), .fifo_q_empty(fq_empty), .fifo_q_rd(fq_rd),
    .wr_valid(w_valid), .wr_ready(w_ready), .wr_addr(w_addr), .wr_data(w_data),
    .state(acq_state), .done(acq_done), .rec_addr, .trig_addr, .early_trig_count
  );

  acq_reader #(.AW(AW), .FIFO_DEPTH(FIFO_DEPTH)) u_reader (
    .clk(mem_clk), .rst(mem_rst), .start(read_start), .rec_addr, .rec_words(capture_words),
    .rd_valid(r_valid), .rd_ready(r_ready), .rd_addr(r_addr),
    .rdata_valid(mem_rdata_valid), .rdata(mem_rdata),
    .fifo_wr_en(fd_wr_en), .fifo_wr_data(fd_wr_data), .fifo_wr_count(fd_count),
    .busy(read_busy), .credit_stalls(read_credit_stalls)
  );

  // The reader owns the memory port while it is busy, the writer otherwise.
  always_comb begin
    mem_cmd_valid = read_busy ? r_valid : w_valid;
    mem_cmd_we    = !read_busy;
    mem_cmd_addr  = read_busy ? r_addr : w_addr;
    mem_wdata     = w_data;
    w_ready       = mem_cmd_ready && !read_busy;
    r_ready       = mem_cmd_ready && read_busy;
  end

  // ---------------- FIFO_DDR and sample rearrangement ----------------
  word_t fd_data;
  logic  fd_empty, fd_rd, fd_overflow;

  async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_ddr (
    .wr_clk(mem_clk), .wr_rst(mem_rst), .wr_en(fd_wr_en), .wr_data(fd_wr_data),
    .wr_full(fd_full), .wr_count(fd_count), .wr_overflow(fd_overflow),
    .rd_clk(pci_clk), .rd_rst(pci_rst), .rd_en(fd_rd), .rd_data(fd_data), .rd_empty(fd_empty)
  );

  sample_unpacker u_unpack (
    .clk(pci_clk), .rst(pci_rst), .fifo_data(fd_data), .fifo_empty(fd_empty), .fifo_rd(fd_rd),
    .out_data(pci_data), .out_valid(pci_valid), .out_ready(pci_ready)
  );

  // The read credits guarantee FIFO_DDR never overflows.
  assert property (@(posedge mem_clk) disable iff (mem_rst) !fd_overflow)
    else $error("daq_card_top: FIFO_DDR overflow");

  // ---------------- LLRF controller ----------------
  llrf_top u_llrf (
    .clk(llrf_clk), .rst(llrf_rst), .adc_in(llrf_adc_in), .ddc_phase_inc, .dds_phase_inc,
    .good_phase, .good_mag, .i_bb(llrf_i), .q_bb(llrf_q), .corr(llrf_corr),
    .corr_avg(llrf_corr_avg), .dac_out
  );
endmodule
