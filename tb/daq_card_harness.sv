// daq_card_harness: stimulus, models and checks for end-to-end tests of
// daq_card_top; the test benches instantiate it next to the design.
//
// Models: two ADC channels (adc12d1000_model; channel I counts up, channel Q
// counts down), a DDR2 memory behind the simplified command port (sparse,
// random acceptance, in-order read data after 3 to 8 clocks), a cPCI sink
// with random back-pressure, and an LLRF cavity tone.
//
// Sequence, for each capture: arm, optionally an early trigger that must be
// ignored, trigger once the pre-trigger history exists, wait for done, read
// the record back through FIFO_DDR and the unpacker, and check that the
// samples arrive complete, in order and from the selected channel (every
// 16-bit sample is a zero-padded 12-bit value one step from the previous),
// that the trigger word sits pretrig words after the record start, and that
// the record has capture_words * 8 samples. Then a FIFO overflow is forced
// by holding the memory port, and the LLRF corrections are checked.
// Each mechanism is counted; a mechanism that never happened is a failure
// (the ring-buffer wrap only when RING_WRAP is set, since a 2^27-word ring
// cannot be filled in simulation).
`timescale 1ns/1ps
module daq_card_harness
  import daq_pkg::*;
  import llrf_pkg::*;
#(
  parameter int unsigned AW        = 8,
  parameter bit          RING_WRAP = 1'b1,
  parameter int unsigned CAP_WORDS = 100
) (
  output logic          adc_rst,
  output logic          dclki_p, dclki_n,
  output sample_t       adc_di, adc_did,
  output logic          dclkq_p, dclkq_n,
  output sample_t       adc_dq, adc_dqd,
  output logic          mem_clk,
  output logic          mem_rst,
  output logic          arm,
  output ch_sel_e       ch_sel,
  output logic [AW:0]   pretrig_words,
  output logic [AW:0]   capture_words,
  output logic          trigger,
  output logic          read_start,
  input  acq_state_e    acq_state,
  input  logic          acq_done,
  input  logic [AW-1:0] rec_addr,
  input  logic [AW-1:0] trig_addr,
  input  logic [15:0]   early_trig_count,
  input  logic          read_busy,
  input  logic [31:0]   read_credit_stalls,
  input  logic          mem_cmd_valid,
  output logic          mem_cmd_ready,
  input  logic          mem_cmd_we,
  input  logic [AW-1:0] mem_cmd_addr,
  input  word_t         mem_wdata,
  output logic          mem_rdata_valid,
  output word_t         mem_rdata,
  input  logic          fifo_i_overflow,
  input  logic          fifo_q_overflow,
  output logic          pci_clk,
  output logic          pci_rst,
  input  logic [31:0]   pci_data,
  input  logic          pci_valid,
  output logic          pci_ready,
  output logic          llrf_clk,
  output logic          llrf_rst,
  output adc_t          llrf_adc_in,
  output phase_t        ddc_phase_inc,
  output phase_t        dds_phase_inc,
  output phase_t        good_phase,
  output logic [15:0]   good_mag,
  input  iq_t           llrf_i,
  input  iq_t           llrf_q,
  input  correction_t   llrf_corr,
  input  correction_t   llrf_corr_avg,
  input  amp_t          dac_out
);
  int checks = 0, failures = 0;
  // mechanism counters
  int n_wrap = 0, n_early = 0, n_mem_stall = 0, n_credit_stall = 0;
  int n_pci_stall = 0, n_ch_i = 0, n_ch_q = 0, n_overflow = 0, n_pretrig = 0;

  // ---------------- ADC ----------------
  int unsigned sent_i, sent_q;
  adc12d1000_model #(.HALF_PERIOD(2.0ns), .SKEW(0.0ns), .START(0), .STEP(1)) u_adc_i (
    .run(1'b1), .dclk_p(dclki_p), .dclk_n(dclki_n), .d(adc_di), .dd(adc_did), .samples_sent(sent_i));
  adc12d1000_model #(.HALF_PERIOD(2.0ns), .SKEW(0.7ns), .START(4095), .STEP(-1)) u_adc_q (
    .run(1'b1), .dclk_p(dclkq_p), .dclk_n(dclkq_n), .d(adc_dq), .dd(adc_dqd), .samples_sent(sent_q));

  // ---------------- clocks ----------------
  initial begin mem_clk = 0;  forever #2.5 mem_clk = ~mem_clk; end    // 200 MHz
  initial begin pci_clk = 0;  forever #15 pci_clk = ~pci_clk; end     // 33 MHz
  initial begin llrf_clk = 0; forever #2 llrf_clk = ~llrf_clk; end    // 250 MHz

  // ---------------- DDR2 memory model ----------------
  word_t mem [longint unsigned];
  int unsigned due_q[$];
  longint unsigned raddr_q[$];
  int unsigned mcyc = 0;
  bit hold_mem = 0;
  logic [AW-1:0] last_waddr;
  bit have_last = 0;

  always @(posedge mem_clk) begin
    mcyc++;
    if (!mem_rst && mem_cmd_valid) begin
      if (!mem_cmd_ready) n_mem_stall++;
      else if (mem_cmd_we) begin
        mem[mem_cmd_addr] = mem_wdata;
        if (have_last && mem_cmd_addr == 0 && last_waddr == '1) n_wrap++;
        last_waddr = mem_cmd_addr; have_last = 1;
      end else begin
        raddr_q.push_back(mem_cmd_addr);
        due_q.push_back(mcyc + $urandom_range(3, 8));
      end
    end
    #0.1;
    mem_cmd_ready = !hold_mem && ($urandom_range(0, 4) != 0);
    mem_rdata_valid = 0;
    if (due_q.size() > 0 && due_q[0] <= mcyc) begin
      longint unsigned a;
      void'(due_q.pop_front());
      a = raddr_q.pop_front();
      mem_rdata = mem.exists(a) ? mem[a] : '0;
      mem_rdata_valid = 1;
      if (due_q.size() > 0 && due_q[0] <= mcyc) due_q[0] = mcyc + 1;
    end
  end

  // ---------------- cPCI sink ----------------
  int unsigned beats = 0;
  logic [15:0] rx [$];
  always @(posedge pci_clk) begin
    if (!pci_rst && pci_valid) begin
      if (pci_ready) begin
        rx.push_back(pci_data[15:0]);
        rx.push_back(pci_data[31:16]);
        beats++;
      end else n_pci_stall++;
    end
    #0.1 pci_ready = ($urandom_range(0, 3) != 0);
  end

  // ---------------- LLRF cavity tone (see tb_llrf_top) ----------------
  int unsigned le = 0;
  bit lstarted = 0;
  always @(posedge llrf_clk) begin
    #0.2;
    if (llrf_rst || !lstarted) le = 0; else le++;
    lstarted = !llrf_rst;
    llrf_adc_in = adc_t'($rtoi($floor(1200.0 * $cos(2.0 * 3.141592653589793 * 0.3 * real'(le)
                                                     + 3.141592653589793 / 4.0) + 0.5)));
  end

  // ---------------- helpers ----------------
  task automatic mem_cycles(input int n);
    repeat (n) @(posedge mem_clk);
    #0.2;
  endtask

  task automatic capture_and_read(input ch_sel_e sel, input int pre, input int cap,
                                  input int wait_words, input bit early);
    int step, v0, n_samples;
    ch_sel = sel; pretrig_words = (AW+1)'(pre); capture_words = (AW+1)'(cap);
    mem_cycles(1);
    arm = 1; mem_cycles(1); arm = 0;
    if (early) begin
      mem_cycles(2);
      trigger = 1; mem_cycles(6); trigger = 0; mem_cycles(6);
      if (early_trig_count != 0 && acq_state == ACQ_ARMED) n_early++;
    end
    mem_cycles(wait_words * 2);
    trigger = 1;
    while (!acq_done) mem_cycles(1);
    trigger = 0;
    if (pre > 0) n_pretrig++;
    checks++;
    if (trig_addr != AW'(rec_addr + pre)) begin failures++; $display("trig_addr %0d, rec_addr %0d", trig_addr, rec_addr); end
    // read back
    rx.delete();
    read_start = 1; mem_cycles(1); read_start = 0;
    while (read_busy) mem_cycles(1);
    n_samples = cap * 8;
    for (int t = 0; t < 200000 && rx.size() < n_samples; t++) @(posedge pci_clk);
    repeat (10) @(posedge pci_clk);
    checks++;
    if (rx.size() != n_samples) begin failures++; $display("received %0d samples, expected %0d", rx.size(), n_samples); end
    step = (sel == CH_I) ? 1 : -1;
    v0 = rx[0];
    for (int k = 0; k < rx.size(); k++) begin
      checks++;
      if (rx[k] !== 16'((v0 + step * k) & 12'hFFF)) begin
        failures++; $display("ch %0d sample %0d: %h, expected %h", sel, k, rx[k], 16'((v0 + step * k) & 12'hFFF));
        break;
      end
    end
    if (sel == CH_I) n_ch_i++; else n_ch_q++;
  endtask

  initial begin
    adc_rst = 1; mem_rst = 1; pci_rst = 1; llrf_rst = 1;
    arm = 0; trigger = 0; read_start = 0; ch_sel = CH_I;
    pretrig_words = '0; capture_words = '0;
    pci_ready = 0; mem_cmd_ready = 0; mem_rdata_valid = 0; mem_rdata = '0;
    ddc_phase_inc = 32'h4CCC_CCCD; dds_phase_inc = 32'h4CCC_CCCD;
    good_phase = 32'h0; good_mag = 16'd9600;
    llrf_adc_in = '0;
    #200;
    adc_rst = 0; mem_rst = 0; pci_rst = 0;
    @(posedge llrf_clk); #0.1 llrf_rst = 0;
    mem_cycles(50);
    // channel I with pre-trigger history and an early trigger; with a small
    // ring, waiting long enough wraps it
    capture_and_read(CH_I, 12, CAP_WORDS, RING_WRAP ? (1 << AW) + 50 : 40, 1);
    // channel Q, no pre-trigger history
    capture_and_read(CH_Q, 0, CAP_WORDS / 2, 10, 0);
    // channel I again, most of the record before the trigger
    capture_and_read(CH_I, CAP_WORDS - 1, CAP_WORDS, CAP_WORDS + 10, 0);
    n_credit_stall = read_credit_stalls;
    // overflow: the memory refuses commands while the ADC keeps sending
    pretrig_words = '0; capture_words = (AW+1)'(CAP_WORDS);
    ch_sel = CH_I;
    hold_mem = 1;
    arm = 1; mem_cycles(1); arm = 0;
    mem_cycles(400);
    if (fifo_i_overflow) n_overflow++;
    hold_mem = 0;
    trigger = 1; while (!acq_done) mem_cycles(1); trigger = 0;
    // LLRF: 45 degree tone of amplitude 1200 -> phase_shift -45 degrees,
    // scale_fact = 9600 * 16384 / (8 * 1200) = 16384
    checks++;
    begin
      real ph;
      ph = real'($signed(llrf_corr_avg.phase_shift)) / 4294967296.0 * 360.0;
      if ((ph + 45.0) ** 2 > 1.0 || (real'(llrf_corr_avg.scale_fact) - 16384.0) ** 2 > (0.02 * 16384.0) ** 2) begin
        failures++; $display("LLRF corrections: %0.2f deg, scale %0d", ph, llrf_corr_avg.scale_fact);
      end
    end
    $display("mechanisms: wrap=%0d early_trigger=%0d pretrigger=%0d mem_stall=%0d credit_stall=%0d pci_stall=%0d ch_i=%0d ch_q=%0d overflow=%0d",
             n_wrap, n_early, n_pretrig, n_mem_stall, n_credit_stall, n_pci_stall, n_ch_i, n_ch_q, n_overflow);
    checks += 9;
    if (RING_WRAP && n_wrap == 0) begin failures++; $display("ring buffer never wrapped"); end
    if (n_early == 0)        begin failures++; $display("early trigger never ignored"); end
    if (n_pretrig == 0)      begin failures++; $display("no pre-trigger capture"); end
    if (n_mem_stall == 0)    begin failures++; $display("memory never stalled"); end
    if (n_credit_stall == 0) begin failures++; $display("reader never waited for FIFO_DDR room"); end
    if (n_pci_stall == 0)    begin failures++; $display("cPCI never stalled"); end
    if (n_ch_i == 0 || n_ch_q == 0) begin failures++; $display("a channel was never captured"); end
    if (n_overflow == 0)     begin failures++; $display("FIFO overflow never flagged"); end
    if (fifo_q_overflow)     begin failures++; $display("unexpected FIFO_Q overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
