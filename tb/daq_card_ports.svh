// Signals between daq_card_top and daq_card_harness (AW must be defined).
logic          adc_rst;
logic          dclki_p, dclki_n, dclkq_p, dclkq_n;
sample_t       adc_di, adc_did, adc_dq, adc_dqd;
logic          mem_clk, mem_rst, arm, trigger, read_start;
ch_sel_e       ch_sel;
logic [AW:0]   pretrig_words, capture_words;
acq_state_e    acq_state;
logic          acq_done, read_busy;
logic [AW-1:0] rec_addr, trig_addr;
logic [15:0]   early_trig_count;
logic [31:0]   read_credit_stalls;
logic          mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rdata_valid;
logic [AW-1:0] mem_cmd_addr;
word_t         mem_wdata, mem_rdata;
logic          fifo_i_overflow, fifo_q_overflow;
logic          pci_clk, pci_rst, pci_valid, pci_ready;
logic [31:0]   pci_data;
logic          llrf_clk, llrf_rst;
adc_t          llrf_adc_in;
phase_t        ddc_phase_inc, dds_phase_inc, good_phase;
logic [15:0]   good_mag;
iq_t           llrf_i, llrf_q;
correction_t   llrf_corr, llrf_corr_avg;
amp_t          dac_out;
