// tb_dmb_input_fifo: self-checking test of one DMB input FIFO (depth 16).
//
// Random writes and reads are compared with a queue model: data, end-of-
// record flag, empty, near-full (at 12 words) and full. The FIFO is then
// filled completely: the word written while full must be lost (wr_lost),
// full_state must stay set after the FIFO is drained and be cleared only by
// reset.
module tb_dmb_input_fifo;
  import ddu_pkg::*;

  localparam int unsigned D = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             wr_en = 0, wr_last = 0, rd_en = 0;
  logic [15:0]      wr_data = '0;
  dmb_word_t        rd_word;
  logic             empty, near_full, full, full_state, wr_lost;
  logic [$clog2(D):0] count;

  dmb_input_fifo #(.DEPTH(D)) dut (.*);

  dmb_word_t q[$];
  int checks = 0, failures = 0;
  bit was_full;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic compare();
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == D), "full");
    check(near_full == (q.size() >= 12), $sformatf("near_full at %0d", q.size()));
    check(int'(count) == q.size(), "count");
    if (q.size() > 0) check(rd_word == q[0], $sformatf("head %h exp %h", rd_word, q[0]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(!full_state && empty, "after reset");
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      compare();
      wr_en   = ($urandom % 2) == 0;
      wr_data = 16'($urandom);
      wr_last = ($urandom % 5) == 0;
      rd_en   = (($urandom % 2) == 0) && q.size() > 0 && !(c > 1000 && c < 1100);
      @(posedge clk);
      was_full = (q.size() == D);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && !was_full) q.push_back('{last: wr_last, data: wr_data});
    end
    // fill to full, one more write is lost
    @(negedge clk);
    rd_en = 0;
    while (q.size() < D) begin
      wr_en = 1; wr_data = 16'($urandom); wr_last = 0;
      @(posedge clk);
      q.push_back('{last: 1'b0, data: wr_data});
      @(negedge clk);
    end
    compare();
    wr_en = 1; wr_data = 16'hFFFF;
    #1 check(wr_lost, "wr_lost when writing to a full FIFO");
    @(posedge clk);
    @(negedge clk);
    wr_en = 0;
    compare();
    check(full_state, "full_state set");
    while (q.size() > 0) begin
      rd_en = 1;
      @(posedge clk);
      void'(q.pop_front());
      @(negedge clk);
      compare();
    end
    rd_en = 0;
    check(full_state, "full_state stays after draining");
    rst = 1;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    check(!full_state, "full_state cleared by reset");
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
