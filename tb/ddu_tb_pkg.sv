// ddu_tb_pkg: reference model pieces shared by the DDU testbenches.
//
// ref_crc16 is a bit-serial LFSR for x^16 + x^15 + x^2 + 1 (start value
// all ones, each 64-bit word shifted in MSB first), written tap by tap and
// independently of the RTL. ref_event_crc runs it over a whole event with the
// CRC field of the Trailer (bits 31:16 of the last word) taken as zero.
// pack_record appends one DMB record to a list of expected 64-bit words,
// four 16-bit words per 64-bit word, first word in bits 15:0, zero padded.
package ddu_tb_pkg;

  typedef logic [63:0] w64_q[$];
  typedef logic [15:0] w16_q[$];

  function automatic logic [15:0] ref_crc16(input logic [15:0] crc_in, input logic [63:0] d);
    logic [15:0] c, n;
    logic        fb;
    c = crc_in;
    for (int i = 63; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      n[0] = fb;
      n[1] = c[0];
      n[2] = c[1] ^ fb;
      for (int k = 3; k < 15; k++) n[k] = c[k-1];
      n[15] = c[14] ^ fb;
      c = n;
    end
    return c;
  endfunction

  function automatic logic [15:0] ref_event_crc(input w64_q ev);
    logic [15:0] c;
    logic [63:0] w;
    c = 16'hFFFF;
    foreach (ev[i]) begin
      w = ev[i];
      if (i == ev.size() - 1) w[31:16] = 16'h0;
      c = ref_crc16(c, w);
    end
    return c;
  endfunction

  function automatic void pack_record(input w16_q rec, ref w64_q out);
    logic [63:0] w;
    int          n;
    w = '0;
    n = 0;
    foreach (rec[i]) begin
      w[16*n +: 16] = rec[i];
      n++;
      if (n == 4) begin
        out.push_back(w);
        w = '0;
        n = 0;
      end
    end
    if (n != 0) out.push_back(w);
  endfunction

endpackage
