// ddu_event_builder: assembles one DDU event per L1A.
//
// For every entry of the L1A-FIFO the builder
//   1. SCAN   looks at the first word waiting in each connected input FIFO.
//             Bits 15-12 = 1000 mark the four DMB lone words of a DMB without
//             data: they are read and dropped (lone words are suppressed).
//             Any other first word opens a DMB record with data; 1001 is the
//             DMB_DAV signature, anything else is flagged as a wrong first
//             word and the record is kept. SCAN ends when every connected
//             input has answered or the timeout expired.
//   2. sends Header 1, Header 2 and Header 3;
//   3. DATA   copies the records of the inputs with data, lowest input first,
//             stacking four 16-bit words into each 64-bit word (first word in
//             bits 15:0). The "9"-words stay in the stream. A record ends with
//             the word marked last; a last 64-bit word left incomplete is
//             padded with zeros;
//   4. sends Trailer-2, Trailer-1 (status evaluated when it is sent) and the
//      Trailer with the 64-bit word count and the CRC of the whole event.
// If an input that is expected to answer, or to go on with its record,
// stays empty for TIMEOUT cycles, its timeout bit pulses and the builder goes
// on without it; the input is then out of step and a reset is needed.
// data_stuck is high while no L1A is pending and the builder is idle but an
// input FIFO holds data.
//
// Output: out_data/out_valid/out_last with out_ready from the receiving side
// (DCC path); a word is held until accepted. While out_ready is low nothing
// is read from the input FIFOs. Throughput is one 16-bit DMB word per cycle.
// evt_start pulses when an event begins (it clears the per-event status).
//
// The framing of DMB records by an end-of-record flag, the order in which
// words are stacked, the zero padding, the Header 3 bit placement and the
// timeout length are this design's choices; header/trailer contents follow
// the DDU-2005 format.
module ddu_event_builder
  import ddu_pkg::*;
#(
  parameter int unsigned TIMEOUT = 16384   // cycles without progress
) (
  input  logic             clk,
  input  logic             rst,
  // configuration
  input  logic [11:0]      source_id,
  input  logic [3:0]       evt_type,
  input  logic [N_DMB-1:0] connected,
  // L1A-FIFO
  input  logic             l1a_empty,
  input  l1a_entry_t       l1a_entry,
  output logic             l1a_rd,
  // DMB input FIFOs
  input  logic [N_DMB-1:0] dmb_empty,
  input  dmb_word_t        dmb_word [N_DMB],
  output logic [N_DMB-1:0] dmb_rd,
  // status to be written into the event
  input  logic [N_DMB-1:0] fifo_full_state,
  input  logic [15:0]      output_status,
  input  logic [6:0]       begin_status,
  input  ddu_err_t         err_status,
  input  logic [N_DMB-1:0] csc_err,
  input  logic [N_DMB-1:0] csc_warn,
  input  tts_t             tts,
  // event output
  output logic [63:0]      out_data,
  output logic             out_valid,
  output logic             out_last,
  input  logic             out_ready,
  // events for the status logic
  output logic             evt_start,
  output logic [N_DMB-1:0] timeout,
  output logic [N_DMB-1:0] wrong_first,
  output logic [N_DMB-1:0] lone_seen,
  output logic             data_stuck
);
  typedef enum logic [3:0] {
    S_IDLE, S_SCAN, S_HDR1, S_HDR2, S_HDR3, S_DATA, S_TRL2, S_TRL1, S_TRL
  } state_t;

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  state_t           state, state_n;
  l1a_entry_t       l1a_r;
  logic [N_DMB-1:0] dav, dav_n, lone, lone_n, done, done_n, pend, pend_n;
  logic [TW-1:0]    timer, timer_n;
  logic [63:0]      pack, pack_n, word;
  logic [1:0]       slot, slot_n;
  logic [23:0]      wcount;
  logic             load, can_load, progress;
  logic [3:0]       cur;
  logic [3:0]       active;
  logic [63:0]      trailer0;
  logic [15:0]      crc_next;

  assign can_load = !out_valid || out_ready;

  // lowest input still to be copied
  always_comb begin
    cur = '0;
    for (int i = N_DMB - 1; i >= 0; i--)
      if (pend[i]) cur = 4'(i);
  end

  always_comb begin
    active = '0;
    for (int i = 0; i < N_DMB; i++) active = active + 4'(dav[i]);
  end

  assign trailer0 = {EOE_MARK, 4'h0, wcount + 24'd1, 16'h0000, 8'h00, tts, 4'h0};

  always_comb begin
    state_n     = state;
    dav_n       = dav;
    lone_n      = lone;
    done_n      = done;
    pend_n      = pend;
    timer_n     = timer;
    pack_n      = pack;
    slot_n      = slot;
    load        = 1'b0;
    word        = '0;
    l1a_rd      = 1'b0;
    dmb_rd      = '0;
    timeout     = '0;
    wrong_first = '0;
    lone_seen   = '0;
    evt_start   = 1'b0;
    progress    = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (!l1a_empty) begin
          l1a_rd    = 1'b1;
          evt_start = 1'b1;
          dav_n     = '0;
          lone_n    = '0;
          done_n    = ~connected;
          timer_n   = '0;
          state_n   = S_SCAN;
        end
      end

      S_SCAN: begin
        for (int i = 0; i < N_DMB; i++) begin
          if (!done[i] && !dmb_empty[i]) begin
            progress = 1'b1;
            if (!lone[i] && dmb_word[i].data[15:12] != LONE_NIBBLE) begin
              dav_n[i]  = 1'b1;
              done_n[i] = 1'b1;
              if (dmb_word[i].data[15:12] != DAV_NIBBLE) wrong_first[i] = 1'b1;
            end else begin
              // lone words: read and drop up to the end of the record
              if (!lone[i]) lone_seen[i] = 1'b1;
              lone_n[i] = 1'b1;
              dmb_rd[i] = 1'b1;
              if (dmb_word[i].last) done_n[i] = 1'b1;
            end
          end
        end
        if (progress) timer_n = '0;
        else if (timer == TW'(TIMEOUT - 1)) begin
          timeout = ~done;
          done_n  = '1;
          timer_n = '0;
        end else timer_n = timer + 1'b1;
        if (&done) begin
          pend_n  = dav;
          state_n = S_HDR1;
        end
      end

      S_HDR1: if (can_load) begin
        load    = 1'b1;
        word    = {BOE_MARK, evt_type, l1a_r.l1a, l1a_r.bxn, source_id, FORMAT_REV_2005, 4'h0};
        state_n = S_HDR2;
      end

      S_HDR2: if (can_load) begin
        load    = 1'b1;
        word    = {HDR2_PATTERN, 1'b0, fifo_full_state};
        state_n = S_HDR3;
      end

      S_HDR3: if (can_load) begin
        load    = 1'b1;
        word    = {1'b0, connected, 1'b0, dav, active, output_status, begin_status, 1'b0, tts};
        timer_n = '0;
        state_n = S_DATA;
      end

      S_DATA: begin
        if (pend == '0) begin
          state_n = S_TRL2;
        end else if (can_load) begin
          if (!dmb_empty[cur]) begin
            dmb_rd[cur] = 1'b1;
            timer_n     = '0;
            pack_n      = pack;
            pack_n[16*slot +: 16] = dmb_word[cur].data;
            if (slot == 2'd3 || dmb_word[cur].last) begin
              load   = 1'b1;
              word   = pack_n;
              pack_n = '0;
              slot_n = '0;
            end else begin
              slot_n = slot + 2'd1;
            end
            if (dmb_word[cur].last) pend_n[cur] = 1'b0;
          end else if (timer == TW'(TIMEOUT - 1)) begin
            timeout[cur] = 1'b1;
            pend_n[cur]  = 1'b0;
            timer_n      = '0;
            if (slot != 2'd0) begin
              load   = 1'b1;
              word   = pack;
              pack_n = '0;
              slot_n = '0;
            end
          end else begin
            timer_n = timer + 1'b1;
          end
        end
      end

      S_TRL2: if (can_load) begin
        load    = 1'b1;
        word    = TRL2_PATTERN;
        state_n = S_TRL1;
      end

      S_TRL1: if (can_load) begin
        load    = 1'b1;
        word    = {err_status, 1'b0, csc_err, 1'b0, csc_warn};
        state_n = S_TRL;
      end

      S_TRL: if (can_load) begin
        load    = 1'b1;
        word    = trailer0;
        state_n = S_IDLE;
      end

      default: state_n = S_IDLE;
    endcase
  end

  ddu_crc16 u_crc (
    .clk, .rst,
    .init     (evt_start),
    .en       (load),
    .data     (word),
    .crc      (),
    .crc_next (crc_next)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      l1a_r     <= '0;
      dav       <= '0;
      lone      <= '0;
      done      <= '0;
      pend      <= '0;
      timer     <= '0;
      pack      <= '0;
      slot      <= '0;
      wcount    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      state <= state_n;
      dav   <= dav_n;
      lone  <= lone_n;
      done  <= done_n;
      pend  <= pend_n;
      timer <= timer_n;
      pack  <= pack_n;
      slot  <= slot_n;
      if (l1a_rd) l1a_r <= l1a_entry;
      if (evt_start) wcount <= '0;
      else if (load) wcount <= wcount + 24'd1;
      if (load) begin
        out_valid <= 1'b1;
        // the Trailer carries the CRC of the event with its CRC field zero
        out_data  <= (state == S_TRL) ? {word[63:32], crc_next, word[15:0]} : word;
        out_last  <= (state == S_TRL);
      end else if (out_ready) begin
        out_valid <= 1'b0;
        out_last  <= 1'b0;
      end
    end
  end

  assign data_stuck = (state == S_IDLE) && l1a_empty && ((~dmb_empty & connected) != '0);

  // a word on the output is held until the receiving side takes it
  property p_hold;
    @(posedge clk) disable iff (rst) (out_valid && !out_ready) |=> (out_valid && $stable(out_data));
  endproperty
  a_hold: assert property (p_hold);
endmodule
