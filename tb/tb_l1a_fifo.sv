// tb_l1a_fifo: self-checking test of the L1A counter, BX counter and
// L1A-FIFO (depth 8).
//
// The testbench counts cycles since the last bc0 itself and numbers the
// triggers itself; each entry read from the FIFO must carry the trigger's
// number and its bunch crossing. Triggers are sent in bursts while the reader
// is stopped so that near-full (6 entries), full and a lost trigger occur;
// ev_cnt_rst must restart the numbering at 1.
module tb_l1a_fifo;
  import ddu_pkg::*;

  localparam int unsigned D = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        l1a = 0, bc0 = 0, ev_cnt_rst = 0, rd_en = 0;
  l1a_entry_t  rd_entry;
  logic        empty, near_full, full, l1a_lost;
  logic [23:0] l1a_count;
  logic [11:0] bxn;

  l1a_fifo #(.DEPTH(D), .ORBIT_BX(100)) dut (.*);

  l1a_entry_t q[$];
  int checks = 0, failures = 0, n_full = 0, n_lost = 0, n_nf = 0;
  int bx_model = 0, l1a_model = 0;
  bit was_full;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    bx_model = 1;                        // one clock edge passes before the first check
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      check(int'(bxn) == bx_model, $sformatf("bxn %0d exp %0d", bxn, bx_model));
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(near_full == (q.size() >= 6), "near_full");
      if (q.size() > 0) check(rd_entry == q[0], $sformatf("entry %h exp %h", rd_entry, q[0]));
      n_full += full;
      n_nf   += near_full;
      bc0        = (c % 250) == 17;
      ev_cnt_rst = (c == 3000);
      l1a        = ($urandom % 4) == 0;
      rd_en      = (c % 400 < 200) ? (($urandom % 2) == 0) : 1'b0;
      #1 if (l1a && full) begin
        check(l1a_lost, "l1a_lost");
        n_lost++;
      end
      @(posedge clk);
      was_full = (q.size() == D);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (l1a) begin
        l1a_model++;
        if (!was_full) q.push_back('{l1a: 24'(l1a_model), bxn: 12'(bx_model)});
      end
      if (ev_cnt_rst) l1a_model = 0;
      bx_model = (bc0 || bx_model == 99) ? 0 : bx_model + 1;
    end
    check(n_full > 0 && n_nf > 0 && n_lost > 0, "full, near-full and lost triggers happened");
    check(int'(l1a_count) == l1a_model, "L1A counter");
    $display("full=%0d nf=%0d lost=%0d", n_full, n_nf, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
