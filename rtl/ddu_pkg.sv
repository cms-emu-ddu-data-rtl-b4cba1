// ddu_pkg: constants and types shared by the DDU event builder.
//
// The DDU (Detector Dependent Unit) of the CMS endcap muon readout merges the
// data of up to 15 DMBs (DAQ Motherboards) triggered by one L1A into a single
// event of 64-bit words:
//   Header 1  {0101, EVT_TYPE, L1A(24), BXN(12), SOURCE_ID(12), FORMAT_REV, free}
//   Header 2  8000.0001.8000 and DMB_FIFO_FULL_STATE(15)
//   Header 3  connected inputs, DMB_DAV, DMB_Active, output/begin status, TTS
//   DMB data  16-bit DMB words stacked four to a 64-bit word
//   Trailer-2 8000.FFFF.8000.8000
//   Trailer-1 DDU_ERROR_STATUS(32), CSC_ERROR_STATE(15), CSC_WARNING_STATE(15)
//   Trailer   {1010, x, WORD64_COUNT(24), CRC(16), EVT_STATUS(8), TTS, free}
// The field widths, the marker nibbles, the fixed patterns, the format revision
// 5 and the bit numbers 32..63 of the error status are those of the DDU-2005
// format. The exact bit placement inside Header 3 and the Trailer, the contents
// of DDU_OUTPUT_STATUS and EVT_BEGIN_STATUS and the TTS encoding are this
// design's own choices (see the README).
package ddu_pkg;

  localparam int unsigned N_DMB = 15;       // DDU inputs (DMB01..DMB15)

  localparam logic [3:0] BOE_MARK   = 4'h5;  // Header 1 beginning-of-event
  localparam logic [3:0] EOE_MARK   = 4'hA;  // Trailer end-of-event
  localparam logic [3:0] DAV_NIBBLE = 4'h9;  // DMB_DAV words, bits 15-12 = 1001
  localparam logic [3:0] LONE_NIBBLE = 4'h8; // DMB lone words, bits 15-12 = 1000

  localparam logic [47:0] HDR2_PATTERN = 48'h8000_0001_8000;
  localparam logic [63:0] TRL2_PATTERN = 64'h8000_FFFF_8000_8000;

  localparam logic [3:0] FORMAT_REV_2005 = 4'd5;

  // DDU_ERROR_STATUS bit numbers, as numbered in the 64-bit Trailer-1 word.
  localparam int B_CFEB_CRC     = 32;
  localparam int B_L1A_MISMATCH = 33;
  localparam int B_LOST_FIBERS  = 34;
  localparam int B_IN_FULL      = 35;
  localparam int B_BITVOTE2     = 36;
  localparam int B_TMB_CRC      = 37;
  localparam int B_TIMEOUT      = 38;
  localparam int B_CTRL_SEQ     = 39;
  localparam int B_MISSING_CTRL = 40;
  localparam int B_CFEB_LOST    = 41;
  localparam int B_CTRL_DLL     = 42;
  localparam int B_HW_BIT       = 43;
  localparam int B_IN_NFULL     = 44;
  localparam int B_SE_WARNING   = 45;
  localparam int B_SE_ERROR     = 46;
  localparam int B_CRITICAL     = 47;
  localparam int B_TMB_L1A      = 48;
  localparam int B_TMB_WC       = 49;
  localparam int B_ALCT_ERR     = 50;
  localparam int B_TMB_ERR      = 51;
  localparam int B_SLINK_NRDY   = 52;
  localparam int B_SLINK_FULL   = 53;
  localparam int B_SPY_DLL      = 54;
  localparam int B_BITVOTE1     = 55;
  localparam int B_NO_LIVE      = 56;
  localparam int B_DATA_STUCK   = 57;
  localparam int B_L1A_FULL     = 58;
  localparam int B_WRONG_FIRST  = 59;
  localparam int B_SPY_FIBER    = 60;
  localparam int B_SPY_NFULL    = 61;
  localparam int B_SPY_FULL     = 62;
  localparam int B_OUT_CONSTR   = 63;

  typedef logic [63:32] ddu_err_t;

  function automatic ddu_err_t err_bits(input int b0, b1 = 0, b2 = 0, b3 = 0, b4 = 0,
                                        b5 = 0, b6 = 0, b7 = 0, b8 = 0, b9 = 0);
    ddu_err_t m;
    m = '0;
    if (b0 >= 32) m[b0] = 1'b1;
    if (b1 >= 32) m[b1] = 1'b1;
    if (b2 >= 32) m[b2] = 1'b1;
    if (b3 >= 32) m[b3] = 1'b1;
    if (b4 >= 32) m[b4] = 1'b1;
    if (b5 >= 32) m[b5] = 1'b1;
    if (b6 >= 32) m[b6] = 1'b1;
    if (b7 >= 32) m[b7] = 1'b1;
    if (b8 >= 32) m[b8] = 1'b1;
    if (b9 >= 32) m[b9] = 1'b1;
    return m;
  endfunction

  // Bits whose condition makes the event bad on the S-Link (the "BAD"
  // entries of the status table); they feed bit 46.
  localparam ddu_err_t BAD_MASK =
      err_bits(B_LOST_FIBERS, B_BITVOTE1, B_BITVOTE2, B_HW_BIT, B_TIMEOUT,
               B_IN_FULL, B_L1A_FULL, B_DATA_STUCK, B_OUT_CONSTR, B_WRONG_FIRST) |
      err_bits(B_CTRL_SEQ, B_MISSING_CTRL, B_L1A_MISMATCH, B_TMB_CRC, B_TMB_L1A,
               B_TMB_WC, B_ALCT_ERR, B_TMB_ERR, B_CFEB_CRC, B_CFEB_LOST);

  // Bits marked "Reset Req'd": they persist until reset and feed bit 47.
  localparam ddu_err_t RESET_MASK =
      err_bits(B_LOST_FIBERS, B_BITVOTE2, B_TIMEOUT, B_IN_FULL, B_L1A_FULL,
               B_DATA_STUCK, B_OUT_CONSTR, B_CTRL_DLL, B_CTRL_SEQ);

  // Per-input checks of the DMB record contents. They need the DMB data
  // format, which is outside this design; a DMB checker reports them here.
  typedef struct packed {
    logic [N_DMB-1:0] ctrl_seq;      // bit 39
    logic [N_DMB-1:0] missing_ctrl;  // bit 40
    logic [N_DMB-1:0] l1a_mismatch;  // bit 33
    logic [N_DMB-1:0] tmb_crc;       // bit 37
    logic [N_DMB-1:0] tmb_l1a;       // bit 48
    logic [N_DMB-1:0] tmb_wc;        // bit 49
    logic [N_DMB-1:0] alct_err;      // bit 50
    logic [N_DMB-1:0] tmb_err;       // bit 51
    logic [N_DMB-1:0] cfeb_crc;      // bit 32
    logic [N_DMB-1:0] cfeb_lost;     // bit 41
  } dmb_check_t;

  // TTS states sent to the FMM (CMS TTS convention).
  typedef enum logic [3:0] {
    TTS_READY   = 4'b1000,
    TTS_BUSY    = 4'b0100,
    TTS_OOS     = 4'b0010,
    TTS_WARN    = 4'b0001,
    TTS_ERROR   = 4'b1100
  } tts_t;

  // One entry of a DMB input FIFO: a 16-bit DMB word and the end-of-record flag.
  typedef struct packed {
    logic        last;
    logic [15:0] data;
  } dmb_word_t;

  // One entry of the L1A-FIFO.
  typedef struct packed {
    logic [23:0] l1a;
    logic [11:0] bxn;
  } l1a_entry_t;

  // CRC-16, polynomial x^16 + x^15 + x^2 + 1, over a 64-bit word, MSB first.
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [63:0] d);
    logic [15:0] c;
    logic        fb;
    c = crc;
    for (int i = 63; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h8005;
    end
    return c;
  endfunction

endpackage
