// spy_fifo: Giga-Bit Ethernet SPY FIFO of the DDU.
//
// Every 64-bit word the DDU sends towards the DCC is offered here as well
// (in_valid, in_data, in_last marking the event's Trailer word). The local
// DAQ link drains the FIFO far slower than the DDU can fill it, so the FIFO
// keeps whole events only: when an event begins while the fill level is at or
// above the tunable threshold nf_thresh, the whole event is skipped
// (skip_evt pulses on its first word) and the FIFO keeps accepting the next
// event that finds room. near_full (status bit 61) is the same comparison.
// full (bit 62) should never happen if the threshold leaves room for the
// largest event; if it does, words are dropped and the rest of that event is
// skipped. The drain side is first-word-fall-through: out_valid, out_data,
// out_last, popped by out_ready. Skipping whole events rather than single
// words, and the default depth of 4096 words, are this design's choices.
module spy_fifo #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [$clog2(DEPTH):0] nf_thresh,
  input  logic                   in_valid,
  input  logic [63:0]            in_data,
  input  logic                   in_last,
  output logic                   out_valid,
  output logic [63:0]            out_data,
  output logic                   out_last,
  input  logic                   out_ready,
  output logic                   near_full,
  output logic                   full,
  output logic                   skip_evt,
  output logic [$clog2(DEPTH):0] count
);
  logic        in_event;   // inside an event on the input side
  logic        skipping;   // the current event is being skipped
  logic        take_first, drop_first, wr_en, empty;
  logic [64:0] rd_word;

  assign near_full  = (count >= nf_thresh);
  assign take_first = in_valid && !in_event && !near_full;
  assign drop_first = in_valid && !in_event && near_full;
  assign wr_en      = in_valid && !full && (in_event ? !skipping : !near_full);
  assign skip_evt   = drop_first;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_event <= 1'b0;
      skipping <= 1'b0;
    end else if (in_valid) begin
      if (!in_event) skipping <= drop_first || (take_first && full);
      else if (full) skipping <= 1'b1;
      in_event <= !in_last;
    end
  end

  ddu_sync_fifo #(.WIDTH(65), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en   (wr_en),
    .wr_data ({in_last, in_data}),
    .rd_en   (out_ready),
    .rd_data (rd_word),
    .empty   (empty),
    .full    (full),
    .count   (count)
  );

  assign out_valid = !empty;
  assign out_last  = rd_word[64];
  assign out_data  = rd_word[63:0];
endmodule
