// tb_ddu_event_builder: self-checking test of the DDU event builder.
//
// The L1A-FIFO and the 15 DMB input FIFOs are modelled by queues presenting a
// first-word-fall-through interface. For each of 40 events every connected
// input (input 2 is left unconnected) sends either four lone words or a DMB
// record of 4 DAV words plus 0..17 words; the words trickle into the input
// queues at random times and the receiving side refuses words at random.
// Special events: an input whose first word has neither lone nor DAV
// signature, an input that never answers (timeout while scanning) and a
// record that stops in the middle (timeout while copying). Every output word
// is compared with an event built by the testbench from the same records;
// the Trailer CRC and word count are recomputed independently. At the end a
// stray word with no L1A pending must raise data_stuck.
module tb_ddu_event_builder;
  import ddu_pkg::*;
  import ddu_tb_pkg::*;

  localparam int unsigned TO = 40;
  localparam int N_EVT = 40;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [11:0]      source_id = 12'h2A5;
  logic [3:0]       evt_type = 4'h1;
  logic [N_DMB-1:0] connected = 15'h7FFB;
  logic             l1a_empty, l1a_rd;
  l1a_entry_t       l1a_entry;
  logic [N_DMB-1:0] dmb_empty, dmb_rd;
  dmb_word_t        dmb_word [N_DMB];
  logic [N_DMB-1:0] full_state = 15'h0102;
  logic [15:0]      out_stat = 16'hBEEF;
  logic [6:0]       beg_stat = 7'h55;
  ddu_err_t         err = 32'hDEAD_0001;
  logic [N_DMB-1:0] csc_err = 15'h1234, csc_warn = 15'h0F0F;
  tts_t             tts = TTS_WARN;
  logic [63:0]      out_data;
  logic             out_valid, out_last, out_ready;
  logic             evt_start, data_stuck;
  logic [N_DMB-1:0] timeout, wrong_first, lone_seen;

  ddu_event_builder #(.TIMEOUT(TO)) dut (
    .clk, .rst, .source_id, .evt_type, .connected,
    .l1a_empty, .l1a_entry, .l1a_rd,
    .dmb_empty, .dmb_word, .dmb_rd,
    .fifo_full_state(full_state), .output_status(out_stat), .begin_status(beg_stat),
    .err_status(err), .csc_err, .csc_warn, .tts,
    .out_data, .out_valid, .out_last, .out_ready,
    .evt_start, .timeout, .wrong_first, .lone_seen, .data_stuck
  );

  // FIFO models
  l1a_entry_t l1a_q[$];
  dmb_word_t  fifo_q [N_DMB][$];
  dmb_word_t  pend_q [N_DMB][$];
  w64_q       exp_q;
  bit         exp_last_q[$];

  always_comb begin
    l1a_empty = (l1a_q.size() == 0);
    l1a_entry = l1a_empty ? '0 : l1a_q[0];
    for (int i = 0; i < N_DMB; i++) begin
      dmb_empty[i] = (fifo_q[i].size() == 0);
      dmb_word[i]  = dmb_empty[i] ? '0 : fifo_q[i][0];
    end
  end

  int checks = 0, failures = 0;
  int n_words = 0, n_events = 0, n_lone = 0, n_wrong = 0, n_timeout = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // pops and trickle
  always @(posedge clk) if (!rst) begin
    if (l1a_rd) void'(l1a_q.pop_front());
    for (int i = 0; i < N_DMB; i++) begin
      if (dmb_rd[i]) void'(fifo_q[i].pop_front());
      if (pend_q[i].size() > 0 && ($urandom % 3) == 0) fifo_q[i].push_back(pend_q[i].pop_front());
    end
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && !out_ready) n_stall++;
    n_lone    += $countones(lone_seen);
    n_wrong   += $countones(wrong_first);
    n_timeout += $countones(timeout);
  end

  // output checker
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    logic [63:0] e;
    n_words++;
    if (exp_q.size() == 0) check(0, "unexpected output word");
    else begin
      e = exp_q.pop_front();
      check(out_data === e, $sformatf("word %0d got %h exp %h", n_words, out_data, e));
      check(out_last === exp_last_q.pop_front(), "last flag");
    end
    if (out_last) n_events++;
  end

  // builds one event: records go to the input models, expected words to exp_q
  task automatic make_event(input int e, input int special);
    w16_q        rec [N_DMB];
    logic [N_DMB-1:0] dav;
    w64_q        ev;
    l1a_entry_t  ent;
    int          len;
    dav = '0;
    ent.l1a = 24'(e + 1);
    ent.bxn = 12'($urandom % 3564);
    l1a_q.push_back(ent);
    for (int i = 0; i < N_DMB; i++) begin
      if (!connected[i]) continue;
      if (special == 2 && i == 5) continue;            // never answers
      if (($urandom % 10) < 3 && !(special == 1 && i == 7) && !(special == 3 && i == 9)) begin
        for (int k = 0; k < 4; k++)
          pend_q[i].push_back('{last: (k == 3), data: {LONE_NIBBLE, 12'($urandom)}});
      end else begin
        dav[i] = 1'b1;
        len = 4 + int'($urandom % 18);
        for (int k = 0; k < len; k++) begin
          logic [15:0] w;
          w = (k < 4) ? {DAV_NIBBLE, 12'($urandom)} : 16'($urandom);
          if (k == 0 && special == 1 && i == 7) w = 16'h1234;
          rec[i].push_back(w);
        end
        if (special == 3 && i == 9) begin
          rec[i] = rec[i][0:5];                       // truncated record: 6 words, no last
          foreach (rec[i][k]) pend_q[i].push_back('{last: 1'b0, data: rec[i][k]});
        end else
          foreach (rec[i][k]) pend_q[i].push_back('{last: (k == rec[i].size() - 1), data: rec[i][k]});
      end
    end
    ev.push_back({BOE_MARK, evt_type, ent.l1a, ent.bxn, source_id, 4'd5, 4'h0});
    ev.push_back({48'h8000_0001_8000, 1'b0, full_state});
    ev.push_back({1'b0, connected, 1'b0, dav, 4'($countones(dav)), out_stat, beg_stat, 1'b0, tts});
    for (int i = 0; i < N_DMB; i++) if (dav[i]) pack_record(rec[i], ev);
    ev.push_back(64'h8000_FFFF_8000_8000);
    ev.push_back({err, 1'b0, csc_err, 1'b0, csc_warn});
    ev.push_back({4'hA, 4'h0, 24'(ev.size() + 1), 16'h0, 8'h00, tts, 4'h0});
    ev[ev.size()-1][31:16] = ref_event_crc(ev);
    foreach (ev[k]) begin
      exp_q.push_back(ev[k]);
      exp_last_q.push_back(k == ev.size() - 1);
    end
  endtask

  initial begin
    out_ready = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int e = 0; e < N_EVT; e++) begin
      make_event(e, (e == 10) ? 1 : (e == 20) ? 2 : (e == 30) ? 3 : 0);
      wait (exp_q.size() == 0);
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(n_events == N_EVT, $sformatf("events %0d", n_events));
    check(n_wrong == 1, $sformatf("wrong-first pulses %0d", n_wrong));
    check(n_timeout == 2, $sformatf("timeouts %0d", n_timeout));
    check(n_lone > 0, "lone words seen");
    check(n_stall > 0, "output stalls");
    check(!data_stuck, "no stuck data while all consumed");
    // stray word with no trigger
    fifo_q[0].push_back('{last: 1'b1, data: 16'h9000});
    @(posedge clk); #1;
    check(data_stuck, "data_stuck raised");
    $display("events=%0d words=%0d lone=%0d stalls=%0d", n_events, n_words, n_lone, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
