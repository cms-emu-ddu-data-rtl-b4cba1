// ddu_status: DDU_ERROR_STATUS(32), CSC error/warning states and TTS state.
//
// Each status bit has a condition input (or is derived from several). The
// output bit (numbered 32..63 as in the 64-bit Trailer-1 word) is the current
// condition OR'ed with what was seen since the start of the event (evt_start
// pulses at the start of each event and clears that memory). Bits of the
// "Reset Req'd" class persist until reset. Bit 45 is the OR of bits 55 and
// 42, bit 46 the OR of all bits that make an event bad, bit 47 the OR of all
// reset-required bits; the classes are those of the format's status table.
//
// Bit-vote errors are tracked per input: the first event of an input with a
// failure raises bit 55 (status only), a failure in any later event on the
// same input raises bit 36 (reset required). Bit 34 compares the connected
// inputs with the set latched in the first cycle after reset. Bit 63 is set
// when an input FIFO is full while the receiving side holds the output.
//
// CSC_ERROR_STATE marks per input the errors of the current event (timeout,
// wrong first word, hardware bit error, second bit-vote error, any DMB
// content check); CSC_WARNING_STATE marks a first bit-vote error or a nearly
// full input FIFO. The TTS state is OOS when a reset is required, BUSY while
// an input FIFO or the L1A-FIFO is full, WARN while one is nearly full, else
// READY. Which input condition goes to which CSC state, the per-event clearing
// and the TTS rule are this design's choices; the format only names them.
module ddu_status
  import ddu_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             evt_start,
  input  logic [N_DMB-1:0] connected,
  input  logic [N_DMB-1:0] bitvote_err,
  input  logic [N_DMB-1:0] hw_bit_err,
  input  logic [N_DMB-1:0] timeout,
  input  logic [N_DMB-1:0] wrong_first,
  input  logic [N_DMB-1:0] dmb_nf,
  input  logic [N_DMB-1:0] dmb_full,
  input  logic             l1a_nf,
  input  logic             l1a_full,
  input  logic             data_stuck,
  input  logic             out_hold,
  input  logic             ctrl_dll_err,
  input  logic             spy_dll_err,
  input  logic             spy_fiber_err,
  input  logic             slink_not_ready,
  input  logic             slink_full,
  input  logic             spy_nf,
  input  logic             spy_full,
  input  dmb_check_t       chk,
  output ddu_err_t         status,
  output logic [N_DMB-1:0] csc_err,
  output logic [N_DMB-1:0] csc_warn,
  output tts_t             tts
);
  ddu_err_t         cond, evt_acc, sticky, raw;
  logic [N_DMB-1:0] bv_prev, bv_cur, bv_first, bv_again;
  logic [N_DMB-1:0] ref_conn, err_now, warn_now, err_acc, warn_acc;
  logic             ref_valid;

  assign bv_first = bitvote_err & ~bv_prev;
  assign bv_again = bitvote_err & bv_prev;

  always_comb begin
    cond = '0;
    cond[B_NO_LIVE]      = (connected == '0);
    cond[B_LOST_FIBERS]  = ref_valid && (connected != ref_conn);
    cond[B_BITVOTE1]     = |bv_first;
    cond[B_BITVOTE2]     = |bv_again;
    cond[B_HW_BIT]       = |hw_bit_err;
    cond[B_TIMEOUT]      = |timeout;
    cond[B_IN_NFULL]     = (|dmb_nf) || l1a_nf;
    cond[B_IN_FULL]      = (|dmb_full) || l1a_full;
    cond[B_L1A_FULL]     = l1a_full;
    cond[B_DATA_STUCK]   = data_stuck;
    cond[B_OUT_CONSTR]   = out_hold && (|dmb_full);
    cond[B_CTRL_DLL]     = ctrl_dll_err;
    cond[B_WRONG_FIRST]  = |wrong_first;
    cond[B_CTRL_SEQ]     = |chk.ctrl_seq;
    cond[B_MISSING_CTRL] = (|chk.missing_ctrl) || (|wrong_first);
    cond[B_L1A_MISMATCH] = |chk.l1a_mismatch;
    cond[B_TMB_CRC]      = |chk.tmb_crc;
    cond[B_TMB_L1A]      = |chk.tmb_l1a;
    cond[B_TMB_WC]       = |chk.tmb_wc;
    cond[B_ALCT_ERR]     = |chk.alct_err;
    cond[B_TMB_ERR]      = |chk.tmb_err;
    cond[B_CFEB_CRC]     = |chk.cfeb_crc;
    cond[B_CFEB_LOST]    = |chk.cfeb_lost;
    cond[B_SLINK_NRDY]   = slink_not_ready;
    cond[B_SLINK_FULL]   = slink_full;
    cond[B_SPY_DLL]      = spy_dll_err;
    cond[B_SPY_FIBER]    = spy_fiber_err;
    cond[B_SPY_NFULL]    = spy_nf;
    cond[B_SPY_FULL]     = spy_full;
  end

  assign err_now  = timeout | wrong_first | hw_bit_err | bv_again |
                    chk.ctrl_seq | chk.missing_ctrl | chk.l1a_mismatch | chk.tmb_crc |
                    chk.tmb_l1a | chk.tmb_wc | chk.alct_err | chk.tmb_err |
                    chk.cfeb_crc | chk.cfeb_lost;
  assign warn_now = bv_first | dmb_nf;

  always_ff @(posedge clk) begin
    if (rst) begin
      evt_acc   <= '0;
      sticky    <= '0;
      bv_prev   <= '0;
      bv_cur    <= '0;
      err_acc   <= '0;
      warn_acc  <= '0;
      ref_valid <= 1'b0;
      ref_conn  <= '0;
    end else begin
      sticky <= sticky | (cond & RESET_MASK);
      if (!ref_valid) begin
        ref_valid <= 1'b1;
        ref_conn  <= connected;
      end
      if (evt_start) begin
        evt_acc  <= cond;
        bv_prev  <= bv_prev | bv_cur;
        bv_cur   <= bitvote_err;
        err_acc  <= err_now;
        warn_acc <= warn_now;
      end else begin
        evt_acc  <= evt_acc | cond;
        bv_cur   <= bv_cur | bitvote_err;
        err_acc  <= err_acc | err_now;
        warn_acc <= warn_acc | warn_now;
      end
    end
  end

  always_comb begin
    raw = cond | evt_acc | sticky;
    raw[B_SE_WARNING] = raw[B_BITVOTE1] || raw[B_CTRL_DLL];
    raw[B_SE_ERROR]   = |(raw & BAD_MASK);
    raw[B_CRITICAL]   = |(raw & RESET_MASK);
    status = raw;
  end

  assign csc_err  = err_acc | err_now;
  assign csc_warn = warn_acc | warn_now;

  always_ff @(posedge clk) begin
    if (rst)                               tts <= TTS_READY;
    else if (status[B_CRITICAL])           tts <= TTS_OOS;
    else if ((|dmb_full) || l1a_full)      tts <= TTS_BUSY;
    else if ((|dmb_nf) || l1a_nf)          tts <= TTS_WARN;
    else                                   tts <= TTS_READY;
  end
endmodule
