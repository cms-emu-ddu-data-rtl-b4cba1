// dmb_input_fifo: input buffer of one DDU input (one DMB fibre).
//
// DMB words arrive, in due time after the L1A and asynchronously to the
// readout, as 16-bit words with an end-of-record flag set on the last word of
// each DMB record. They are stored first-word-fall-through for the event
// builder. Three status outputs feed the DDU error status:
//   near_full   fill level at or above NF_LEVEL (bit 44, "INPUT FIFO Near Full")
//   full        FIFO full now; further words are lost (bit 35)
//   full_state  the FIFO has reached FULL at least once since reset; this is
//               the input's DMB_FIFO_FULL_STATE bit of Header 2 and, as the
//               format says, only a reset clears it
// wr_lost pulses when a word is dropped because the FIFO is full.
// The depth and the near-full level are not specified by the data format:
// 2048 words and 3/4 of the depth are this design's choices.
module dmb_input_fifo
  import ddu_pkg::*;
#(
  parameter int unsigned DEPTH    = 2048,
  parameter int unsigned NF_LEVEL = (DEPTH * 3) / 4
) (
  input  logic                    clk,
  input  logic                    rst,
  // from the fibre receiver
  input  logic                    wr_en,
  input  logic [15:0]             wr_data,
  input  logic                    wr_last,
  // to the event builder
  input  logic                    rd_en,
  output dmb_word_t               rd_word,
  output logic                    empty,
  // status
  output logic                    near_full,
  output logic                    full,
  output logic                    full_state,
  output logic                    wr_lost,
  output logic [$clog2(DEPTH):0]  count
);
  dmb_word_t wr_word;
  assign wr_word = '{last: wr_last, data: wr_data};

  ddu_sync_fifo #(.WIDTH($bits(dmb_word_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en   (wr_en),
    .wr_data (wr_word),
    .rd_en   (rd_en),
    .rd_data (rd_word),
    .empty   (empty),
    .full    (full),
    .count   (count)
  );

  assign near_full = (count >= ($clog2(DEPTH)+1)'(NF_LEVEL));
  assign wr_lost   = wr_en && full;

  always_ff @(posedge clk) begin
    if (rst)       full_state <= 1'b0;
    else if (full) full_state <= 1'b1;
  end
endmodule
