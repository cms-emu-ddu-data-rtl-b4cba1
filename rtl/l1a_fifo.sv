// l1a_fifo: L1A counter, bunch-crossing counter and L1A-FIFO of the DDU.
//
// The DDU clock is taken as the LHC bunch clock, so the BX counter advances by
// one every cycle and restarts from 0 on bc0 (one pulse per LHC orbit). The
// 24-bit L1A counter counts triggers; the first L1A after reset or after
// ev_cnt_rst is numbered 1. On each l1a pulse the pair {L1A number, BXN} is
// written into the FIFO, from which the event builder takes one entry per
// event (first-word-fall-through, rd_en pops). near_full and full feed the
// status bits 44/35 and 58; l1a_lost pulses for a trigger that found the FIFO
// full. The depth (64), the near-full level (3/4) and the counter start value
// are this design's choices.
module l1a_fifo
  import ddu_pkg::*;
#(
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned NF_LEVEL = (DEPTH * 3) / 4,
  parameter int unsigned ORBIT_BX = 3564   // BX counter wraps here if bc0 is missing
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a,         // level-1 accept, one cycle
  input  logic        bc0,         // orbit marker, one cycle
  input  logic        ev_cnt_rst,  // clears the L1A counter
  input  logic        rd_en,
  output l1a_entry_t  rd_entry,
  output logic        empty,
  output logic        near_full,
  output logic        full,
  output logic        l1a_lost,
  output logic [23:0] l1a_count,
  output logic [11:0] bxn
);
  l1a_entry_t              wr_entry;
  logic [$clog2(DEPTH):0]  count;
  logic [23:0]             l1a_next;

  assign l1a_next = l1a_count + 24'd1;
  assign wr_entry = '{l1a: l1a_next, bxn: bxn};

  always_ff @(posedge clk) begin
    if (rst || ev_cnt_rst) l1a_count <= '0;
    else if (l1a)          l1a_count <= l1a_next;
  end

  always_ff @(posedge clk) begin
    if (rst || bc0)                       bxn <= '0;
    else if (bxn == 12'(ORBIT_BX - 1))    bxn <= '0;
    else                                  bxn <= bxn + 12'd1;
  end

  ddu_sync_fifo #(.WIDTH($bits(l1a_entry_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en   (l1a),
    .wr_data (wr_entry),
    .rd_en   (rd_en),
    .rd_data (rd_entry),
    .empty   (empty),
    .full    (full),
    .count   (count)
  );

  assign near_full = (count >= ($clog2(DEPTH)+1)'(NF_LEVEL));
  assign l1a_lost  = l1a && full;
endmodule
