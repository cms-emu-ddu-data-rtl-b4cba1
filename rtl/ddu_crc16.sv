// ddu_crc16: running DDU_CRC(16) of one event.
//
// The CRC register is loaded with 16'hFFFF by init (start of an event) and is
// advanced by one 64-bit word, most significant bit first, on each en. crc is
// the register; crc_next is combinationally what it becomes after data, which
// lets the Trailer carry the CRC of the whole event including itself (with
// its own CRC field taken as zero). The data format names the 16-bit CRC but
// does not give the polynomial: x^16 + x^15 + x^2 + 1 and the all-ones start
// value are this design's choice.
module ddu_crc16
  import ddu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [63:0] data,
  output logic [15:0] crc,
  output logic [15:0] crc_next
);
  assign crc_next = crc16_word(crc, data);

  always_ff @(posedge clk) begin
    if (rst || init) crc <= 16'hFFFF;
    else if (en)     crc <= crc_next;
  end
endmodule
