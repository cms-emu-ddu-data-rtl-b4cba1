// tb_ddu_status: self-checking test of the DDU error status logic.
//
// Each condition input is pulsed on its own after a reset and the whole
// 32-bit status word is compared with the bits the status table gives for
// it: the bit itself, bit 46 for conditions that make an event bad, bit 47
// and persistence across events for reset-required conditions, bit 45 for
// bit-vote and clock-DLL errors. Also checked: clearing of status-only bits
// at the next event, first/second bit-vote errors on one input, lost/new
// fibres against the set seen after reset, the CSC error/warning vectors and
// the TTS state.
module tb_ddu_status;
  import ddu_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             evt_start = 0;
  logic [N_DMB-1:0] connected = 15'h7FFF;
  logic [N_DMB-1:0] bitvote_err = 0, hw_bit_err = 0, timeout = 0, wrong_first = 0;
  logic [N_DMB-1:0] dmb_nf = 0, dmb_full = 0;
  logic l1a_nf = 0, l1a_full = 0, data_stuck = 0, out_hold = 0, ctrl_dll_err = 0;
  logic spy_dll_err = 0, spy_fiber_err = 0, slink_not_ready = 0, slink_full = 0;
  logic spy_nf = 0, spy_full = 0;
  dmb_check_t       chk = '0;
  ddu_err_t         status;
  logic [N_DMB-1:0] csc_err, csc_warn;
  tts_t             tts;

  ddu_status dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [63:0] b(input int i);
    return 64'd1 << i;
  endfunction

  task automatic do_reset();
    rst = 1;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    @(negedge clk);
  endtask

  task automatic new_event();
    evt_start = 1;
    @(negedge clk);
    evt_start = 0;
    @(negedge clk);
  endtask

  task automatic expect_status(input logic [63:0] e, input string what);
    check(status == e[63:32], $sformatf("%s: status %h exp %h", what, status, e[63:32]));
  endtask

  // one-cycle pulse of a condition selected by number
  task automatic pulse(input int which, input int ch);
    case (which)
      0:  hw_bit_err[ch] = 1;
      1:  timeout[ch] = 1;
      2:  wrong_first[ch] = 1;
      3:  data_stuck = 1;
      4:  ctrl_dll_err = 1;
      5:  chk.ctrl_seq[ch] = 1;
      6:  chk.missing_ctrl[ch] = 1;
      7:  chk.l1a_mismatch[ch] = 1;
      8:  chk.tmb_crc[ch] = 1;
      9:  chk.tmb_l1a[ch] = 1;
      10: chk.tmb_wc[ch] = 1;
      11: chk.alct_err[ch] = 1;
      12: chk.tmb_err[ch] = 1;
      13: chk.cfeb_crc[ch] = 1;
      14: chk.cfeb_lost[ch] = 1;
      15: slink_not_ready = 1;
      16: slink_full = 1;
      17: spy_dll_err = 1;
      18: spy_fiber_err = 1;
      19: spy_nf = 1;
      20: spy_full = 1;
      default: ;
    endcase
    @(negedge clk);
    hw_bit_err = 0; timeout = 0; wrong_first = 0; data_stuck = 0; ctrl_dll_err = 0; chk = '0;
    slink_not_ready = 0; slink_full = 0; spy_dll_err = 0; spy_fiber_err = 0; spy_nf = 0;
    spy_full = 0;
  endtask

  // expected status for each pulse: {bits, persists, per-input error}
  logic [63:0] exp_bits [21];
  bit          exp_reset [21];
  bit          exp_csc [21];

  initial begin
    exp_bits[0]  = b(43) | b(46);                  exp_reset[0]  = 0; exp_csc[0]  = 1;
    exp_bits[1]  = b(38) | b(46) | b(47);          exp_reset[1]  = 1; exp_csc[1]  = 1;
    exp_bits[2]  = b(59) | b(40) | b(46);          exp_reset[2]  = 0; exp_csc[2]  = 1;
    exp_bits[3]  = b(57) | b(46) | b(47);          exp_reset[3]  = 1; exp_csc[3]  = 0;
    exp_bits[4]  = b(42) | b(45) | b(47);          exp_reset[4]  = 1; exp_csc[4]  = 0;
    exp_bits[5]  = b(39) | b(46) | b(47);          exp_reset[5]  = 1; exp_csc[5]  = 1;
    exp_bits[6]  = b(40) | b(46);                  exp_reset[6]  = 0; exp_csc[6]  = 1;
    exp_bits[7]  = b(33) | b(46);                  exp_reset[7]  = 0; exp_csc[7]  = 1;
    exp_bits[8]  = b(37) | b(46);                  exp_reset[8]  = 0; exp_csc[8]  = 1;
    exp_bits[9]  = b(48) | b(46);                  exp_reset[9]  = 0; exp_csc[9]  = 1;
    exp_bits[10] = b(49) | b(46);                  exp_reset[10] = 0; exp_csc[10] = 1;
    exp_bits[11] = b(50) | b(46);                  exp_reset[11] = 0; exp_csc[11] = 1;
    exp_bits[12] = b(51) | b(46);                  exp_reset[12] = 0; exp_csc[12] = 1;
    exp_bits[13] = b(32) | b(46);                  exp_reset[13] = 0; exp_csc[13] = 1;
    exp_bits[14] = b(41) | b(46);                  exp_reset[14] = 0; exp_csc[14] = 1;
    exp_bits[15] = b(52);                          exp_reset[15] = 0; exp_csc[15] = 0;
    exp_bits[16] = b(53);                          exp_reset[16] = 0; exp_csc[16] = 0;
    exp_bits[17] = b(54);                          exp_reset[17] = 0; exp_csc[17] = 0;
    exp_bits[18] = b(60);                          exp_reset[18] = 0; exp_csc[18] = 0;
    exp_bits[19] = b(61);                          exp_reset[19] = 0; exp_csc[19] = 0;
    exp_bits[20] = b(62);                          exp_reset[20] = 0; exp_csc[20] = 0;

    do_reset();
    expect_status(0, "quiet after reset");
    check(tts == TTS_READY, "TTS ready");

    for (int w = 0; w < 21; w++) begin
      int ch;
      ch = w % N_DMB;
      do_reset();
      pulse(w, ch);
      expect_status(exp_bits[w], $sformatf("condition %0d", w));
      check(csc_err == (exp_csc[w] ? N_DMB'(1) << ch : '0), $sformatf("csc_err for %0d", w));
      @(negedge clk);
      check(tts == (exp_reset[w] ? TTS_OOS : TTS_READY), $sformatf("tts for %0d", w));
      new_event();
      expect_status(exp_reset[w] ? exp_bits[w] : 64'd0, $sformatf("condition %0d after next event", w));
      check(csc_err == '0, "csc_err cleared by next event");
    end

    // bit-vote: first event on an input is a warning, a later one needs reset
    do_reset();
    new_event();
    bitvote_err[3] = 1;
    @(negedge clk);
    bitvote_err = 0;
    expect_status(b(55) | b(45) | b(46), "first bit-vote error");
    check(csc_warn == 15'h0008 && csc_err == 0, "csc_warn for first bit-vote error");
    bitvote_err[3] = 1;                              // same event again: still first event
    @(negedge clk);
    bitvote_err = 0;
    expect_status(b(55) | b(45) | b(46), "same event, still first");
    new_event();
    expect_status(0, "cleared at next event");
    bitvote_err[4] = 1;                              // other input: first event for it
    @(negedge clk);
    bitvote_err = 0;
    expect_status(b(55) | b(45) | b(46), "first error on another input");
    new_event();
    bitvote_err[3] = 1;
    @(negedge clk);
    bitvote_err = 0;
    expect_status(b(36) | b(46) | b(47), "second bit-vote error");
    check(csc_err == 15'h0008, "csc_err for second bit-vote error");
    new_event();
    expect_status(b(36) | b(46) | b(47), "second bit-vote error persists");

    // fibres
    do_reset();
    connected = 15'h7FFE;
    @(negedge clk);
    expect_status(b(34) | b(46) | b(47), "lost fibre");
    connected = 15'h7FFF;
    new_event();
    expect_status(b(34) | b(46) | b(47), "lost fibre persists");
    connected = '0;
    do_reset();
    expect_status(b(56), "no live fibres");
    connected = 15'h7FFF;
    do_reset();

    // FIFO levels
    dmb_nf[6] = 1;
    @(negedge clk);
    expect_status(b(44), "input near full");
    check(csc_warn == 15'h0040, "csc_warn for near full");
    @(negedge clk);
    check(tts == TTS_WARN, "TTS warning");
    dmb_nf = 0;
    l1a_nf = 1;
    new_event();
    expect_status(b(44), "L1A FIFO near full");
    l1a_nf = 0;
    l1a_full = 1;
    @(negedge clk);
    expect_status(b(58) | b(35) | b(44) | b(46) | b(47), "L1A FIFO full");
    l1a_full = 0;
    @(negedge clk);
    check(tts == TTS_OOS, "TTS out of sync after full");
    do_reset();
    dmb_full[2] = 1;
    @(negedge clk);
    expect_status(b(35) | b(46) | b(47), "input full, output free");
    out_hold = 1;
    @(negedge clk);
    expect_status(b(35) | b(63) | b(46) | b(47), "input full while output held");
    out_hold = 0;
    dmb_full = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
