// tb_ddu_top: end-to-end test of the DDU at its default sizes.
//
// A model of 15 DMBs answers every L1A: each DMB sends four lone words or a
// record starting with four DAV words, word by word at random times. A model
// of the receiving side refuses words at random, and the SPY reader drains
// slowly so that the SPY FIFO has to skip events (threshold 256 words).
// For every event the testbench builds the expected DDU event (L1A number and
// BX counted by the testbench from l1a and bc0, headers, stacked DMB words,
// trailers) and compares it word by word; the word count and the CRC of the
// Trailer are recomputed from the received event. Each SPY event must equal
// a DCC event, in order, and every event the SPY path misses must match a
// skip pulse. Scenarios, each counted and required at least once:
//   lone-word suppression, DMBs with data, output held by the receiver, SPY
//   event skipped, several L1As pending, wrong first word (bit 59), bit-vote
//   error in an event (bit 55), timeout of a silent DMB (bit 38, persisting,
//   TTS out-of-sync), an input FIFO overflowing while the output is held
//   (Header 2 full state, bits 35 and 63), data stuck without trigger (bit 57),
//   L1A-FIFO full (bit 58), a DMB checker flag and S-Link full reaching
//   Trailer-1 and Header 3, and a reset after which events are clean again.
module tb_ddu_top;
  import ddu_pkg::*;
  import ddu_tb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [11:0]      source_id = 12'h345;
  logic [3:0]       evt_type = 4'h1;
  logic [12:0]      spy_nf_thresh = 13'd256;
  logic             l1a = 0, bc0 = 0, ev_cnt_rst = 0;
  logic [N_DMB-1:0] link_up = 15'h7FFF;
  logic [N_DMB-1:0] dmb_wr = 0, dmb_last = 0, bitvote_err = 0, hw_bit_err = 0;
  logic [15:0]      dmb_data [N_DMB];
  dmb_check_t       dmb_check = '0;
  logic             ctrl_dll_err = 0, spy_dll_err = 0;
  logic [63:0]      dcc_data, spy_data;
  logic             dcc_valid, dcc_last, dcc_ready = 1, slink_not_ready = 0, slink_full = 0;
  logic             spy_valid, spy_last, spy_ready = 0, spy_fiber_err = 0;
  tts_t             tts;
  ddu_err_t         err_status;
  logic [N_DMB-1:0] dmb_fifo_full_state;
  logic             spy_skip_evt;

  ddu_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ stimulus side
  dmb_word_t pend_q [N_DMB][$];
  int        ready_mode = 0;   // 0: random, 1: held low
  int        spy_mode = 0;     // 0: slow drain, 1: fast drain
  int        cyc = 0, bx_model = 0, l1a_model = 0;

  always @(negedge clk) begin
    for (int i = 0; i < N_DMB; i++) begin
      dmb_wr[i] = 0;
      if (pend_q[i].size() > 0 && ($urandom % 2) == 0) begin
        dmb_word_t w;
        w = pend_q[i].pop_front();
        dmb_wr[i]   = 1;
        dmb_data[i] = w.data;
        dmb_last[i] = w.last;
      end
    end
    dcc_ready = (ready_mode == 1) ? 1'b0 : (($urandom % 4) != 0);
    spy_ready = (spy_mode == 1) ? 1'b1 : (($urandom % 16) == 0);
  end

  // BX model: the DDU clock is the bunch clock, bc0 once per 3564 cycles
  always @(posedge clk) begin
    cyc++;
    bx_model = (rst || bc0) ? 0 : (bx_model == 3563 ? 0 : bx_model + 1);
  end
  always @(negedge clk) bc0 = (cyc % 3564) == 100;

  // ------------------------------------------------------------ expected events
  typedef struct {
    w64_q words;
    bit   loose;          // only structure and status bits are checked
  } exp_ev_t;
  exp_ev_t exp_q[$];

  int n_lone = 0, n_dav = 0, n_hold = 0, n_spy_skip = 0, n_spy_evt = 0, n_multi = 0;
  int n_wrong = 0, n_bitvote = 0, n_timeout = 0, n_full = 0, n_stuck = 0, n_l1a_full = 0;
  int n_recover = 0, n_ext = 0;

  // issues an L1A and the DMB answers; returns the expected event
  task automatic trigger(input int special);
    w16_q             rec [N_DMB];
    logic [N_DMB-1:0] dav;
    exp_ev_t          ev;
    logic [23:0]      l1n;
    logic [11:0]      bxn;
    int               len;
    @(negedge clk);
    l1a = 1;
    l1a_model++;
    l1n = 24'(l1a_model);
    bxn = 12'(bx_model);               // BX counter value when the L1A is sampled
    @(negedge clk);
    l1a = 0;
    dav = '0;
    for (int i = 0; i < N_DMB; i++) begin
      if (!link_up[i]) continue;
      if (special == 2 && i == 5) continue;                 // silent DMB
      if (($urandom % 10) < 3 && !(special == 1 && i == 7)) begin
        n_lone++;
        for (int k = 0; k < 4; k++)
          pend_q[i].push_back('{last: (k == 3), data: {LONE_NIBBLE, 12'($urandom)}});
      end else begin
        dav[i] = 1'b1;
        n_dav++;
        len = 4 + int'($urandom % 28);
        for (int k = 0; k < len; k++) begin
          logic [15:0] w;
          w = (k < 4) ? {DAV_NIBBLE, 12'($urandom)} : 16'($urandom);
          if (special == 1 && i == 7 && k == 0) w = 16'h1234;
          rec[i].push_back(w);
          pend_q[i].push_back('{last: (k == len - 1), data: w});
        end
      end
    end
    ev.loose = 0;
    ev.words.push_back({BOE_MARK, evt_type, l1n, bxn, source_id, 4'd5, 4'h0});
    ev.words.push_back({48'h8000_0001_8000, 1'b0, 15'h0});
    ev.words.push_back({1'b0, link_up, 1'b0, dav, 4'($countones(dav)), 28'h0});
    for (int i = 0; i < N_DMB; i++) if (dav[i]) pack_record(rec[i], ev.words);
    ev.words.push_back(64'h8000_FFFF_8000_8000);
    ev.words.push_back(64'h0);
    ev.words.push_back({4'hA, 4'h0, 24'(ev.words.size() + 1), 32'h0});
    exp_q.push_back(ev);
  endtask

  // ------------------------------------------------------------ output side
  w64_q cur_ev, spy_cur;
  w64_q dcc_events[$];
  ddu_err_t last_trl1;
  logic [N_DMB-1:0] last_csc_err, last_csc_warn, last_full_state;
  logic [63:0]      last_hdr3;
  int   n_events = 0;
  bit   hdr1_seen = 0;

  always @(posedge clk) if (!rst) begin
    if (dcc_valid && !dcc_ready) n_hold++;
    if (spy_skip_evt) n_spy_skip++;
    if (err_status[B_L1A_FULL]) n_l1a_full++;
    if (dcc_valid && dcc_ready) begin
      cur_ev.push_back(dcc_data);
      if (cur_ev.size() == 1) hdr1_seen = 1;
      if (dcc_last) begin
        exp_ev_t e;
        w64_q    got;
        int      n;
        got = cur_ev;
        cur_ev = {};
        n = got.size();
        n_events++;
        dcc_events.push_back(got);
        last_trl1       = got[n-2][63:32];
        last_csc_err    = got[n-2][30:16];
        last_csc_warn   = got[n-2][14:0];
        last_full_state = got[1][14:0];
        last_hdr3       = got[2];
        check(int'(got[n-1][55:32]) == n, "word count in Trailer");
        check(got[n-1][31:16] == ref_event_crc(got), "CRC in Trailer");
        check(got[n-1][63:60] == EOE_MARK && got[0][63:60] == BOE_MARK, "event markers");
        check(got[n-3] == 64'h8000_FFFF_8000_8000, "Trailer-2 pattern");
        check(got[1][63:16] == 48'h8000_0001_8000, "Header 2 pattern");
        if (exp_q.size() == 0) check(0, "unexpected event");
        else begin
          e = exp_q.pop_front();
          if (!e.loose) begin
            check(n == e.words.size(), $sformatf("event %0d length %0d exp %0d", n_events, n, e.words.size()));
            for (int k = 0; k < n && k < e.words.size(); k++) begin
              logic [63:0] m;
              m = '1;
              if (k == 2)     m = 64'hFFFF_FFFF_F000_0000;   // status fields of Header 3
              if (k == 1)     m = 64'hFFFF_FFFF_FFFF_8000;   // full state checked apart
              if (k == n - 2) m = 64'h0;                     // Trailer-1 checked apart
              if (k == n - 1) m = 64'hFFFF_FFFF_0000_FF00;   // CRC, TTS checked apart
              check((got[k] & m) == (e.words[k] & m),
                    $sformatf("event %0d word %0d got %h exp %h", n_events, k, got[k], e.words[k]));
            end
          end
        end
      end
    end
    if (spy_valid && spy_ready) begin
      spy_cur.push_back(spy_data);
      if (spy_last) begin
        bit found;
        found = 0;
        n_spy_evt++;
        while (dcc_events.size() > 0 && !found) begin
          w64_q d;
          d = dcc_events.pop_front();
          if (d == spy_cur) found = 1;
        end
        check(found, "SPY event equals a DCC event");
        spy_cur = {};
      end
    end
  end

  task automatic wait_idle(input int max_cycles);
    int c;
    c = 0;
    while ((exp_q.size() != 0) && c < max_cycles) begin
      @(negedge clk);
      c++;
    end
    check(exp_q.size() == 0, "events drained");
  endtask

  // ------------------------------------------------------------ scenario
  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // plain events, one at a time
    for (int e = 0; e < 20; e++) begin
      trigger(0);
      wait_idle(20000);
    end
    // only the SPY near-full warning may be set: the SPY reader is slow
    check((last_trl1 & ~(ddu_err_t'(1) << (B_SPY_NFULL - 32))) == 0 && tts == TTS_READY,
          "clean events have no other status bits");

    // several L1As pending at once
    for (int e = 0; e < 6; e++) trigger(0);
    if (dut.u_l1a.u_fifo.count > 1) n_multi++;
    wait_idle(50000);

    // wrong first word from DMB 8 (input index 7)
    trigger(1);
    wait_idle(20000);
    if (last_trl1[B_WRONG_FIRST] && last_trl1[B_MISSING_CTRL] && last_csc_err[7]) n_wrong++;
    check(last_trl1[B_WRONG_FIRST] && last_csc_err == 15'h0080, "wrong first word flagged");

    // bit-vote error on input 3 while an event is being built
    trigger(0);
    wait (hdr1_seen);
    hdr1_seen = 0;
    @(negedge clk);
    bitvote_err[3] = 1;
    @(negedge clk);
    bitvote_err = 0;
    wait_idle(20000);
    if (last_trl1[B_BITVOTE1] && last_csc_warn[3]) n_bitvote++;
    check(last_trl1[B_BITVOTE1] && last_trl1[B_SE_WARNING] && !last_trl1[B_CRITICAL],
          "first bit-vote error flagged as warning");

    // DMB checker result and S-Link full during an event reach the event words
    slink_full = 1;
    trigger(0);
    wait (hdr1_seen);
    hdr1_seen = 0;
    @(negedge clk);
    dmb_check.tmb_crc[4] = 1;
    @(negedge clk);
    dmb_check = '0;
    wait_idle(20000);
    slink_full = 0;
    if (last_trl1[B_TMB_CRC] && last_trl1[B_SLINK_FULL] && last_csc_err[4]) n_ext++;
    check(last_trl1[B_TMB_CRC] && last_trl1[B_SE_ERROR] && last_trl1[B_SLINK_FULL] &&
          !last_trl1[B_CRITICAL] && last_csc_err == 15'h0010, "checker and S-Link flags in Trailer-1");
    check(last_hdr3[13] == 1'b1, "S-Link full in DDU_OUTPUT_STATUS of Header 3");

    // more events with a fast SPY reader, then drain the SPY FIFO
    spy_mode = 1;
    for (int e = 0; e < 4; e++) begin
      trigger(0);
      wait_idle(20000);
    end
    repeat (5000) @(negedge clk);
    spy_mode = 0;

    // a DMB with DAV that never sends: timeout
    trigger(2);
    wait_idle(40000);
    if (last_trl1[B_TIMEOUT] && last_csc_err[5]) n_timeout++;
    check(last_trl1[B_TIMEOUT] && last_trl1[B_CRITICAL], "timeout flagged");
    check(tts == TTS_OOS, "TTS out of sync after timeout");
    trigger(0);
    wait_idle(20000);
    check(last_trl1[B_TIMEOUT], "timeout bit persists until reset");

    // input FIFO 1 overflows while the receiver holds the output
    ready_mode = 1;
    begin
      exp_ev_t lev;
      lev.loose = 1;
      lev.words = {};
      exp_q.push_back(lev);
      @(negedge clk);
      l1a = 1;
      l1a_model++;
      @(negedge clk);
      l1a = 0;
      for (int i = 0; i < N_DMB; i++)
        for (int k = 0; k < 4; k++)
          pend_q[i].push_back('{last: (k == 3 && i != 0), data: (i == 0) ? {DAV_NIBBLE, 12'(k)} : {LONE_NIBBLE, 12'(k)}});
      for (int k = 0; k < 2100; k++) pend_q[0].push_back('{last: 1'b0, data: 16'(k)});
      while (pend_q[0].size() > 0) @(negedge clk);
      repeat (10) @(negedge clk);
      check(err_status[B_IN_FULL] && err_status[B_OUT_CONSTR] && dmb_fifo_full_state[0],
            "input FIFO full while output held");
      ready_mode = 0;
      repeat (3000) @(negedge clk);
      pend_q[0].push_back('{last: 1'b1, data: 16'hEEEE});
      wait_idle(40000);
      if (last_trl1[B_IN_FULL] && last_trl1[B_OUT_CONSTR]) n_full++;
      check(last_trl1[B_IN_FULL] && last_trl1[B_OUT_CONSTR], "overflow in Trailer-1");
    end
    trigger(0);
    wait_idle(20000);
    check(last_full_state == 15'h0001, "Header 2 shows the input that reached full");

    // a word with no trigger: data stuck
    pend_q[2].push_back('{last: 1'b1, data: 16'h9999});
    repeat (10) @(negedge clk);
    if (err_status[B_DATA_STUCK]) n_stuck++;
    check(err_status[B_DATA_STUCK], "data stuck flagged");

    // trigger burst with no DMB answers: L1A-FIFO full
    for (int k = 0; k < 80; k++) begin
      l1a = 1;
      @(negedge clk);
    end
    l1a = 0;
    @(negedge clk);
    check(err_status[B_L1A_FULL], "L1A-FIFO full flagged");

    // reset and recover
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N_DMB; i++) pend_q[i] = {};
    exp_q = {};
    cur_ev = {};
    spy_cur = {};
    dcc_events = {};
    l1a_model = 0;
    repeat (3) @(negedge clk);
    check(err_status == 0 && dmb_fifo_full_state == 0 && tts == TTS_READY, "clean after reset");
    for (int e = 0; e < 3; e++) begin
      trigger(0);
      wait_idle(20000);
    end
    if (last_trl1 == 0) n_recover++;
    check(last_trl1 == 0, "clean event after reset");

    $display("events=%0d lone=%0d dav=%0d hold=%0d spy_events=%0d spy_skips=%0d multi=%0d",
             n_events, n_lone, n_dav, n_hold, n_spy_evt, n_spy_skip, n_multi);
    $display("wrong_first=%0d bitvote=%0d timeout=%0d in_full=%0d stuck=%0d l1a_full=%0d recover=%0d",
             n_wrong, n_bitvote, n_timeout, n_full, n_stuck, n_l1a_full, n_recover);
    check(n_lone > 0, "lone words suppressed at least once");
    check(n_dav > 0, "DMB data merged at least once");
    check(n_hold > 0, "output held at least once");
    check(n_spy_skip > 0, "SPY skipped an event at least once");
    check(n_spy_evt > 0, "SPY delivered an event at least once");
    check(n_multi > 0, "several L1As pending at least once");
    check(n_wrong > 0, "wrong first word at least once");
    check(n_bitvote > 0, "bit-vote error at least once");
    check(n_timeout > 0, "timeout at least once");
    check(n_full > 0, "input FIFO overflow at least once");
    check(n_stuck > 0, "data stuck at least once");
    check(n_l1a_full > 0, "L1A-FIFO full at least once");
    check(n_recover > 0, "recovery after reset");
    check(n_ext > 0, "external status flags at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
