// ddu_top: DDU of the CMS endcap muon readout, event-building path.
//
// On each L1A the L1A and BX numbers go into the L1A-FIFO. Each of the 15
// DMBs answers with four lone words (no data) or with a record that starts
// with its DMB_DAV words, written into its own input FIFO. The event builder
// takes one L1A entry at a time, drops the lone words, merges the records of
// all DMBs with data into one event of 64-bit words framed by the DDU headers
// and trailers, and sends it to the DCC (Data Concentration Card) path. The
// same words go into the SPY FIFO for the Giga-Bit Ethernet local DAQ link,
// which keeps whole events only while it is below its tunable threshold.
// The status block turns FIFO levels, timeouts, link and receiver flags into
// the 32-bit error status written in Trailer-1 and the TTS state for the FMM.
//
// Not inside: the fibre receivers (they deliver DMB words with an end-of-
// record flag, link status and bit-vote / bit errors), the checker of the
// DMB record contents (its results come in on dmb_check), the S-Link/DCC
// transmitter, the Ethernet formatter behind the SPY FIFO and the clock
// DLLs. Their signals are ports. One clock, the LHC bunch clock, is assumed
// for everything.
//
// DDU_OUTPUT_STATUS (Header 3) as built here:
//   [0] S-Link not ready  [1] S-Link full  [2] output held by receiver
//   [3] output constricted (bit 63)  [4] SPY near full  [5] SPY full
//   [6] SPY fibre error  [7] SPY clock-DLL error
//   [8] previous event skipped by the SPY FIFO  [15:9] 0
// EVT_BEGIN_STATUS (Header 3), the status when Header 3 is sent:
//   [6] bit 47  [5] bit 46  [4] bit 58  [3] bit 35  [2] bit 44  [1] bit 56  [0] bit 34
// Both layouts are this design's own.
module ddu_top
  import ddu_pkg::*;
#(
  parameter int unsigned DMB_FIFO_DEPTH = 2048,
  parameter int unsigned L1A_FIFO_DEPTH = 64,
  parameter int unsigned SPY_FIFO_DEPTH = 4096,
  parameter int unsigned TIMEOUT        = 16384
) (
  input  logic                            clk,
  input  logic                            rst,
  // configuration
  input  logic [11:0]                     source_id,
  input  logic [3:0]                      evt_type,
  input  logic [$clog2(SPY_FIFO_DEPTH):0] spy_nf_thresh,
  // trigger and timing
  input  logic                            l1a,
  input  logic                            bc0,
  input  logic                            ev_cnt_rst,
  // fibre receivers, one per DMB
  input  logic [N_DMB-1:0]                link_up,
  input  logic [N_DMB-1:0]                dmb_wr,
  input  logic [15:0]                     dmb_data [N_DMB],
  input  logic [N_DMB-1:0]                dmb_last,
  input  logic [N_DMB-1:0]                bitvote_err,
  input  logic [N_DMB-1:0]                hw_bit_err,
  // DMB record checker
  input  dmb_check_t                      dmb_check,
  // clock monitors
  input  logic                            ctrl_dll_err,
  input  logic                            spy_dll_err,
  // DCC / S-Link output
  output logic [63:0]                     dcc_data,
  output logic                            dcc_valid,
  output logic                            dcc_last,
  input  logic                            dcc_ready,
  input  logic                            slink_not_ready,
  input  logic                            slink_full,
  // SPY output to the Ethernet formatter
  output logic [63:0]                     spy_data,
  output logic                            spy_valid,
  output logic                            spy_last,
  input  logic                            spy_ready,
  input  logic                            spy_fiber_err,
  // FMM and status
  output tts_t                            tts,
  output ddu_err_t                        err_status,
  output logic [N_DMB-1:0]                dmb_fifo_full_state,
  output logic                            spy_skip_evt
);
  // L1A-FIFO
  l1a_entry_t l1a_entry;
  logic       l1a_empty, l1a_rd, l1a_nf, l1a_full;

  l1a_fifo #(.DEPTH(L1A_FIFO_DEPTH)) u_l1a (
    .clk, .rst,
    .l1a, .bc0, .ev_cnt_rst,
    .rd_en     (l1a_rd),
    .rd_entry  (l1a_entry),
    .empty     (l1a_empty),
    .near_full (l1a_nf),
    .full      (l1a_full),
    .l1a_lost  (),
    .l1a_count (),
    .bxn       ()
  );

  // DMB input FIFOs
  dmb_word_t        dmb_word [N_DMB];
  logic [N_DMB-1:0] dmb_empty, dmb_rd, dmb_nf, dmb_full;

  for (genvar g = 0; g < N_DMB; g++) begin : g_in
    dmb_input_fifo #(.DEPTH(DMB_FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .wr_en      (dmb_wr[g]),
      .wr_data    (dmb_data[g]),
      .wr_last    (dmb_last[g]),
      .rd_en      (dmb_rd[g]),
      .rd_word    (dmb_word[g]),
      .empty      (dmb_empty[g]),
      .near_full  (dmb_nf[g]),
      .full       (dmb_full[g]),
      .full_state (dmb_fifo_full_state[g]),
      .wr_lost    (),
      .count      ()
    );
  end

  // status
  logic             evt_start, data_stuck, out_hold;
  logic [N_DMB-1:0] timeout, wrong_first, csc_err, csc_warn;
  logic             spy_nf, spy_full, spy_skipped_prev;
  logic [15:0]      output_status;
  logic [6:0]       begin_status;

  assign out_hold = dcc_valid && !dcc_ready;

  ddu_status u_status (
    .clk, .rst,
    .evt_start,
    .connected       (link_up),
    .bitvote_err,
    .hw_bit_err,
    .timeout,
    .wrong_first,
    .dmb_nf,
    .dmb_full,
    .l1a_nf,
    .l1a_full,
    .data_stuck,
    .out_hold,
    .ctrl_dll_err,
    .spy_dll_err,
    .spy_fiber_err,
    .slink_not_ready,
    .slink_full,
    .spy_nf,
    .spy_full,
    .chk             (dmb_check),
    .status          (err_status),
    .csc_err,
    .csc_warn,
    .tts
  );

  assign output_status = {7'b0, spy_skipped_prev, spy_dll_err, spy_fiber_err, spy_full, spy_nf,
                          err_status[B_OUT_CONSTR], out_hold, slink_full, slink_not_ready};
  assign begin_status  = {err_status[B_CRITICAL], err_status[B_SE_ERROR], err_status[B_L1A_FULL],
                          err_status[B_IN_FULL], err_status[B_IN_NFULL], err_status[B_NO_LIVE],
                          err_status[B_LOST_FIBERS]};

  // event builder
  ddu_event_builder #(.TIMEOUT(TIMEOUT)) u_builder (
    .clk, .rst,
    .source_id,
    .evt_type,
    .connected       (link_up),
    .l1a_empty,
    .l1a_entry,
    .l1a_rd,
    .dmb_empty,
    .dmb_word,
    .dmb_rd,
    .fifo_full_state (dmb_fifo_full_state),
    .output_status,
    .begin_status,
    .err_status,
    .csc_err,
    .csc_warn,
    .tts,
    .out_data        (dcc_data),
    .out_valid       (dcc_valid),
    .out_last        (dcc_last),
    .out_ready       (dcc_ready),
    .evt_start,
    .timeout,
    .wrong_first,
    .lone_seen       (),
    .data_stuck
  );

  // SPY FIFO: a copy of every word accepted by the DCC path
  logic spy_in_valid;
  assign spy_in_valid = dcc_valid && dcc_ready;

  spy_fifo #(.DEPTH(SPY_FIFO_DEPTH)) u_spy (
    .clk, .rst,
    .nf_thresh (spy_nf_thresh),
    .in_valid  (spy_in_valid),
    .in_data   (dcc_data),
    .in_last   (dcc_last),
    .out_valid (spy_valid),
    .out_data  (spy_data),
    .out_last  (spy_last),
    .out_ready (spy_ready),
    .near_full (spy_nf),
    .full      (spy_full),
    .skip_evt  (spy_skip_evt),
    .count     ()
  );

  // remembers whether the SPY FIFO skipped the event sent before this one
  logic spy_skip_cur;
  always_ff @(posedge clk) begin
    if (rst) begin
      spy_skip_cur     <= 1'b0;
      spy_skipped_prev <= 1'b0;
    end else begin
      if (spy_skip_evt) spy_skip_cur <= 1'b1;
      if (evt_start) begin
        spy_skipped_prev <= spy_skip_cur;
        spy_skip_cur     <= 1'b0;
      end
    end
  end
endmodule
