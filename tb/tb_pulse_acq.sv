// tb_pulse_acq: the card in nuclear pulse acquisition, with every parameter
// of daq_card_top at its default (2 GB ring, 64-word FIFOs).
//
// Both ADC channels digitize preamplifier-like pulses (adc_pulse_model), and
// the discriminator output of the selected channel is the TTL trigger, so
// the trigger arrives some 50 ns after the pulse has begun. Each capture arms
// the writer with a pre-trigger length, waits until that much history is in
// the ring, fires one pulse, waits for the record to complete and reads it
// back over the cPCI side. Checks, per pulse:
//   - the record has capture_words * 8 samples;
//   - the pulse onset lies in the record, within 8 words of the trigger
//     point (pretrig_words * 8 samples in), with only baseline before it;
//   - every sample of the record equals the sample the ADC sent, in order;
//   - the peak equals baseline + the pulse amplitude (the value an offline
//     amplitude spectrum is built from).
// Four pulses with different amplitudes and pre-trigger lengths are taken,
// three on channel I and one on channel Q. Memory and cPCI readiness are
// random. The LLRF chain of the top is held in reset.
`timescale 1ns/1ps
module tb_pulse_acq;
  import daq_pkg::*;
  import llrf_pkg::*;
  localparam int unsigned AW = daq_pkg::ADDR_W;
  localparam int BASELINE = 200;
  localparam int CAP = 128;                 // record length in words
  `include "daq_card_ports.svh"

  daq_card_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- ADC channels and discriminators ----------------
  logic        fire_i = 0, fire_q = 0;
  int          amp_i = 0, amp_q = 0;
  logic        trig_i, trig_q;
  int unsigned start_i, start_q;
  adc_pulse_model #(.BASELINE(BASELINE)) u_adc_i (
    .fire(fire_i), .amp(amp_i), .dclk_p(dclki_p), .dclk_n(dclki_n),
    .d(adc_di), .dd(adc_did), .trig(trig_i), .pulse_start(start_i));
  adc_pulse_model #(.BASELINE(BASELINE)) u_adc_q (
    .fire(fire_q), .amp(amp_q), .dclk_p(dclkq_p), .dclk_n(dclkq_n),
    .d(adc_dq), .dd(adc_dqd), .trig(trig_q), .pulse_start(start_q));
  assign trigger = (ch_sel == CH_I) ? trig_i : trig_q;

  // ---------------- clocks ----------------
  initial begin mem_clk = 0;  forever #2.5 mem_clk = ~mem_clk; end    // 200 MHz
  initial begin pci_clk = 0;  forever #15 pci_clk = ~pci_clk; end     // 33 MHz
  assign llrf_clk = 1'b0;

  // ---------------- DDR2 memory model ----------------
  word_t mem [longint unsigned];
  int unsigned due_q[$];
  longint unsigned raddr_q[$];
  int unsigned mcyc = 0;

  always @(posedge mem_clk) begin
    mcyc++;
    if (!mem_rst && mem_cmd_valid && mem_cmd_ready) begin
      if (mem_cmd_we) mem[mem_cmd_addr] = mem_wdata;
      else begin
        raddr_q.push_back(mem_cmd_addr);
        due_q.push_back(mcyc + $urandom_range(3, 8));
      end
    end
    #0.1;
    mem_cmd_ready = ($urandom_range(0, 4) != 0);
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
  logic [15:0] rx [$];
  always @(posedge pci_clk) begin
    if (!pci_rst && pci_valid && pci_ready) begin
      rx.push_back(pci_data[15:0]);
      rx.push_back(pci_data[31:16]);
    end
    #0.1 pci_ready = ($urandom_range(0, 3) != 0);
  end

  task automatic mem_cycles(input int n);
    repeat (n) @(posedge mem_clk);
    #0.2;
  endtask

  task automatic take_pulse(input ch_sel_e sel, input int pre, input int amp);
    int k0, peak, offset, bad, n_samples;
    int unsigned s0;
    ch_sel = sel; pretrig_words = (AW+1)'(pre); capture_words = (AW+1)'(CAP);
    mem_cycles(1);
    arm = 1; mem_cycles(1); arm = 0;
    mem_cycles(pre * 3 + 40);                       // pre-trigger history fills
    checks++;
    if (acq_state != ACQ_ARMED) begin failures++; $display("writer not armed"); end
    if (sel == CH_I) begin amp_i = amp; fire_i = 1; end
    else             begin amp_q = amp; fire_q = 1; end
    mem_cycles(2);
    fire_i = 0; fire_q = 0;
    while (!acq_done) mem_cycles(1);
    s0 = (sel == CH_I) ? start_i : start_q;
    rx.delete();
    read_start = 1; mem_cycles(1); read_start = 0;
    n_samples = CAP * 8;
    for (int t = 0; t < 100000 && rx.size() < n_samples; t++) @(posedge pci_clk);
    repeat (10) @(posedge pci_clk);
    checks++;
    if (rx.size() != n_samples) begin
      failures++; $display("received %0d samples, expected %0d", rx.size(), n_samples);
      return;
    end
    // onset: the first sample above baseline
    k0 = -1; peak = 0;
    foreach (rx[k]) begin
      if (k0 < 0 && int'(rx[k]) > BASELINE) k0 = k;
      if (int'(rx[k]) > peak) peak = int'(rx[k]);
    end
    checks++;
    if (k0 <= 0 || k0 < pre * 8 - 64 || k0 > pre * 8 + 64) begin
      failures++; $display("pulse onset at sample %0d of the record, trigger point %0d", k0, pre * 8);
      return;
    end
    // the record against the samples sent
    offset = int'(s0) - k0;
    bad = 0;
    foreach (rx[k]) begin
      if (rx[k] !== 16'((sel == CH_I) ? u_adc_i.hist[offset + k] : u_adc_q.hist[offset + k])) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d samples differ from those sent", bad); end
    checks++;
    if (peak != BASELINE + amp) begin failures++; $display("peak %0d, expected %0d", peak, BASELINE + amp); end
    $display("ch %0d: pulse amplitude %0d, onset at sample %0d, trigger point %0d", sel, peak - BASELINE, k0, pre * 8);
    mem_cycles(400);                                 // let the pulse decay
  endtask

  initial begin
    adc_rst = 1; mem_rst = 1; pci_rst = 1; llrf_rst = 1;
    arm = 0; read_start = 0; ch_sel = CH_I;
    pretrig_words = '0; capture_words = '0;
    pci_ready = 0; mem_cmd_ready = 0; mem_rdata_valid = 0; mem_rdata = '0;
    ddc_phase_inc = '0; dds_phase_inc = '0; good_phase = '0; good_mag = '0;
    llrf_adc_in = '0;
    #200;
    adc_rst = 0; mem_rst = 0; pci_rst = 0;
    mem_cycles(50);
    take_pulse(CH_I, 16, 1500);
    take_pulse(CH_I, 32, 600);
    take_pulse(CH_Q, 24, 3000);
    take_pulse(CH_I, 100, 2200);
    checks++;
    if (fifo_i_overflow || fifo_q_overflow) begin failures++; $display("FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
