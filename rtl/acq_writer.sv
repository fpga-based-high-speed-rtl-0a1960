// acq_writer: channel select and DDR2 write controller with programmable
// pre-trigger capture.
//
// The writer takes 128-bit sample words from FIFO_I or FIFO_Q (the channel
// select multiplexer) and writes them to consecutive DDR2 word addresses.
// The buffer is used as a ring: while armed it writes continuously, wrapping
// at 2^ADDR_W words, so the newest history is always in memory. A rising edge
// on the trigger input, once at least pretrig_words words have been written
// since arming, marks the next word as the trigger word; the writer then
// writes capture_words - pretrig_words more words (trigger word included) and
// stops. The record is capture_words words long and starts pretrig_words
// words before the trigger word (rec_addr, modulo the buffer size). Triggers
// that come before the pre-trigger history is complete are ignored and
// counted. Channel select, pre-trigger acquisition and the 2 GB buffer come
// from the document; the ring-buffer scheme, the trigger granularity of one
// word (eight samples) and the control interface are this design's own.
//
// When idle or done, both FIFOs are drained and their data discarded, so a
// new capture starts with fresh samples. While capturing, the other channel's
// FIFO is drained.
//
// Memory port: one write command per beat, wr_valid/wr_ready handshake,
// address and data held stable while wr_valid is high and wr_ready low.
// The trigger input is asynchronous and passes a two-flop synchronizer,
// so it takes effect three clock edges after it rises.
module acq_writer
  import daq_pkg::*;
#(
  parameter int unsigned AW = daq_pkg::ADDR_W   // word address width
) (
  input  logic          clk,
  input  logic          rst,            // synchronous, active high
  // control (hold stable while capturing)
  input  logic          arm,            // pulse: start a capture
  input  ch_sel_e       ch_sel,
  input  logic [AW:0]   pretrig_words,  // 0 .. 2^AW-1
  input  logic [AW:0]   capture_words,  // pretrig_words+1 .. 2^AW
  input  logic          trigger,        // asynchronous TTL trigger
  // FIFO_I / FIFO_Q read ports (show-ahead)
  input  word_t         fifo_i_data,
  input  logic          fifo_i_empty,
  output logic          fifo_i_rd,
  input  word_t         fifo_q_data,
  input  logic          fifo_q_empty,
  output logic          fifo_q_rd,
  // memory write port
  output logic          wr_valid,
  input  logic          wr_ready,
  output logic [AW-1:0] wr_addr,
  output word_t         wr_data,
  // status
  output acq_state_e    state,
  output logic          done,
  output logic [AW-1:0] rec_addr,       // first word of the record
  output logic [AW-1:0] trig_addr,      // address of the trigger word
  output logic [15:0]   early_trig_count
);
  logic [2:0]    trig_sync;
  logic          trig_rise;
  logic [AW-1:0] next_addr;    // address of the next word loaded
  logic [AW:0]   written;      // words loaded since arming, saturating
  logic [AW:0]   post_left;    // words still to load after the trigger
  logic          capturing, slot_free, sel_empty, load;
  word_t         sel_data;

  always_comb begin
    capturing = (state == ACQ_ARMED) || (state == ACQ_POST && post_left != 0);
    slot_free = !wr_valid || wr_ready;
    sel_empty = (ch_sel == CH_I) ? fifo_i_empty : fifo_q_empty;
    sel_data  = (ch_sel == CH_I) ? fifo_i_data  : fifo_q_data;
    load      = capturing && slot_free && !sel_empty;
    fifo_i_rd = (capturing && ch_sel == CH_I) ? load : !fifo_i_empty;
    fifo_q_rd = (capturing && ch_sel == CH_Q) ? load : !fifo_q_empty;
    trig_rise = trig_sync[1] && !trig_sync[2];
    done      = (state == ACQ_DONE);
  end

  always_ff @(posedge clk) begin
    if (rst) trig_sync <= '0;
    else     trig_sync <= {trig_sync[1:0], trigger};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state            <= ACQ_IDLE;
      wr_valid         <= 1'b0;
      wr_addr          <= '0;
      wr_data          <= '0;
      next_addr        <= '0;
      written          <= '0;
      post_left        <= '0;
      trig_addr        <= '0;
      rec_addr         <= '0;
      early_trig_count <= '0;
    end else begin
      if (wr_valid && wr_ready) wr_valid <= 1'b0;
      if (load) begin
        wr_valid  <= 1'b1;
        wr_addr   <= next_addr;
        wr_data   <= sel_data;
        next_addr <= next_addr + 1'b1;
        if (written[AW] == 1'b0) written <= written + 1'b1;
      end
      unique case (state)
        ACQ_IDLE, ACQ_DONE: begin
          if (arm) begin
            state     <= ACQ_ARMED;
            next_addr <= '0;
            written   <= '0;
          end
        end
        ACQ_ARMED: begin
          if (trig_rise) begin
            if (written >= pretrig_words) begin
              state     <= ACQ_POST;
              trig_addr <= next_addr + AW'(load);
              rec_addr  <= next_addr + AW'(load) - pretrig_words[AW-1:0];
              post_left <= capture_words - pretrig_words;
            end else begin
              early_trig_count <= early_trig_count + 1'b1;
            end
          end
        end
        ACQ_POST: begin
          if (load) post_left <= post_left - 1'b1;
          if (post_left == 0 && (!wr_valid || wr_ready)) state <= ACQ_DONE;
        end
        default: state <= ACQ_IDLE;
      endcase
    end
  end

  // A write beat must stay stable until it is accepted.
  assert property (@(posedge clk) disable iff (rst)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data))
    else $error("acq_writer: write beat changed before acceptance");
  assert property (@(posedge clk) disable iff (rst)
                   arm |-> capture_words > pretrig_words && capture_words <= (AW+1)'(1) << AW)
    else $error("acq_writer: capture_words out of range");
endmodule
