// frontend: the write side of the chip, run once per trigger.
//
// A pulse on trg starts an event. On each of the next 16, 32, 48 or 64 clocks
// (set by nrofgx: 00, 01, 10, 11) one sample is taken: amplitude and channel
// address come from the ampl/chaddr pins, or, in front-end test mode, from the
// I/O bus (channel address on D17-D12, amplitude on D11-D00). The channel's
// threshold and pedestal are looked up by that channel address (th_addr ->
// th/ped) and the sparse_scan datapath decides whether the sample is kept.
// A kept sample is written into the data FIFO as {chaddr, amplitude - pedestal}
// and counted. Each kept sample also sets bit chaddr[3:0] of the current
// pattern word; the word goes into the bit-map memory after every 16th sample.
// One more clock then writes the end-event word {event number, hit count},
// tagged as end of event, pulls mack_n low for that cycle, and advances the
// event counter. An event of 16*k channels thus takes 16*k+1 clocks after trg.
//
// The chip's Clk pin is modelled as the single clock clk, free running; the
// event sequence is counted from the trg pulse. The first event is numbered 0.
// clr_n (the chip's Clr_N) is an asynchronous active-low clear of the counters
// and the sequencer. A trg arriving while an event is still being written is
// ignored. These points are this design's own choices.
module frontend
  import dilogic_pkg::*;
(
  input  logic              clk,
  input  logic              clr_n,
  input  logic              trg,
  input  logic [1:0]        nrofgx,
  input  logic              subcmp,
  input  logic              test_mode,
  input  logic [AW-1:0]     ampl,
  input  logic [CHW-1:0]    chaddr,
  input  logic [DW-1:0]     bus_in,
  // threshold / pedestal lookup
  output logic [CHW-1:0]    th_addr,
  input  logic [PW-1:0]     th,
  input  logic [PW-1:0]     ped,
  // data FIFO write
  output logic              dwr,
  output fifo_entry_t       dwr_data,
  // bit-map memory write
  output logic              bwr,
  output logic [GRP-1:0]    bwr_data,
  // end-event signalling and status
  output logic              mack_n,
  output logic              busy
);

  typedef enum logic [1:0] {FE_IDLE, FE_RUN, FE_EE} fe_state_e;

  fe_state_e          state;
  logic [CHW-1:0]     cnt;       // sample index within the event
  logic [1:0]         ngrp;      // nrofgx latched at trigger
  logic [HITW-1:0]    hits;
  logic [EVW-1:0]     evnum;
  logic [GRP-1:0]     pat;

  data_word_t         sample;
  logic               keep;
  logic [AW-1:0]      value;
  logic [GRP-1:0]     pat_next;
  logic               last;

  assign sample  = test_mode ? data_word_t'(bus_in) : data_word_t'{chaddr: chaddr, ampl: ampl};
  assign th_addr = sample.chaddr;

  sparse_scan #(.AW(AW), .PW(PW)) u_scan (
    .subcmp (subcmp),
    .ampl   (sample.ampl),
    .th     (th),
    .ped    (ped),
    .keep   (keep),
    .value  (value)
  );

  always_comb begin
    pat_next = pat;
    if (keep) pat_next[sample.chaddr[3:0]] = 1'b1;
  end

  assign last = (cnt == {ngrp, 4'hF});

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      state <= FE_IDLE;
      cnt   <= '0;
      ngrp  <= '0;
      hits  <= '0;
      evnum <= '0;
      pat   <= '0;
    end else begin
      unique case (state)
        FE_IDLE: if (trg) begin
          state <= FE_RUN;
          cnt   <= '0;
          ngrp  <= nrofgx;
          hits  <= '0;
          pat   <= '0;
        end
        FE_RUN: begin
          cnt <= cnt + 1'b1;
          if (keep) hits <= hits + 1'b1;
          pat <= (cnt[3:0] == 4'hF) ? '0 : pat_next;
          if (last) state <= FE_EE;
        end
        FE_EE: begin
          evnum <= evnum + 1'b1;
          state <= FE_IDLE;
        end
        default: state <= FE_IDLE;
      endcase
    end
  end

  always_comb begin
    dwr      = 1'b0;
    dwr_data = '0;
    bwr      = 1'b0;
    bwr_data = pat_next;
    if (state == FE_RUN) begin
      dwr      = keep;
      dwr_data = '{ee: 1'b0, word: data_word_t'{chaddr: sample.chaddr, ampl: value}};
      bwr      = (cnt[3:0] == 4'hF);
    end else if (state == FE_EE) begin
      dwr      = 1'b1;
      dwr_data = '{ee: 1'b1, word: ee_word_t'{evnum: evnum, nhits: hits}};
    end
  end

  assign mack_n = (state != FE_EE);
  assign busy   = (state != FE_IDLE);

endmodule
