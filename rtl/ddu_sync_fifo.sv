// ddu_sync_fifo: single-clock first-word-fall-through FIFO used by the DMB
// input FIFOs, the L1A-FIFO and the SPY FIFO of the DDU.
//
// The head entry is always visible on rd_data while empty is low; rd_en pops
// it. A write while full is dropped (the caller flags that condition). Both
// a write and a pop may happen in the same cycle. count gives the fill level
// for the near-full thresholds of the callers. Storage is a plain array with
// a combinational read of the head entry. Depth must be a power of two.
module ddu_sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("ddu_sync_fifo: DEPTH must be a power of two");
endmodule
