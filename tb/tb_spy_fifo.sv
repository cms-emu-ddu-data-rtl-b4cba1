// tb_spy_fifo: self-checking test of the SPY FIFO (depth 16).
//
// Events of 2..8 words are offered while the drain side is stalled in
// stretches. The testbench keeps its own fill count and decides, at the first
// word of every event, whether the FIFO must keep or skip the event (fill at
// or above the threshold); a word offered while the FIFO is full is lost and
// the rest of its event skipped. Everything drained must equal the kept
// words, in order, with the end-of-event flags. Thresholds of 10 and then 16
// (equal to the depth) make both skipped events and a full FIFO happen.
module tb_spy_fifo;
  localparam int unsigned D = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [$clog2(D):0] nf_thresh = 10, count;
  logic        in_valid = 0, in_last = 0, out_valid, out_last, out_ready = 0;
  logic [63:0] in_data = '0, out_data;
  logic        near_full, full, skip_evt;

  spy_fifo #(.DEPTH(D)) dut (.*);

  logic [64:0] kept_q[$];
  int checks = 0, failures = 0, n_skip = 0, n_full = 0, n_kept_evt = 0, fill = 0;
  bit skipping = 0, in_evt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // drain side and model of the fill level
  always @(posedge clk) if (!rst) begin
    bit was_full, was_nf;
    was_full = (fill == int'(D));
    was_nf   = (fill >= int'(nf_thresh));
    if (out_ready && out_valid) begin
      logic [64:0] e;
      e = kept_q.pop_front();
      check({out_last, out_data} === e, $sformatf("spy word %h exp %h", out_data, e));
      fill--;
    end
    if (in_valid) begin
      if (!in_evt) begin
        skipping = was_nf;
        check(skip_evt == skipping, "skip_evt");
        if (skipping) n_skip++; else n_kept_evt++;
      end
      if (!skipping && was_full) begin
        skipping = 1;
        n_full++;
      end
      if (!skipping) begin
        kept_q.push_back({in_last, in_data});
        fill++;
      end
      in_evt = !in_last;
    end
  end

  always @(negedge clk) if (!rst) begin
    check(int'(count) == fill, $sformatf("count %0d exp %0d", count, fill));
    check(near_full == (fill >= int'(nf_thresh)), "near_full");
    check(full == (fill == int'(D)), "full");
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    fork
      begin
        for (int e = 0; e < 300; e++) begin
          int len;
          if (e == 200) nf_thresh = 16;
          len = 2 + int'($urandom % 7);
          for (int k = 0; k < len; k++) begin
            while (($urandom % 3) == 0) @(negedge clk);
            in_valid = 1;
            in_data  = {32'(e), 32'($urandom)};
            in_last  = (k == len - 1);
            @(negedge clk);
            in_valid = 0;
          end
        end
      end
      begin
        for (int c = 0; c < 6000; c++) begin
          out_ready = ((c / 60) % 2 == 0) ? (($urandom % 4) == 0) : 1'b0;
          @(negedge clk);
        end
      end
    join
    out_ready = 1;
    repeat (40) @(negedge clk);
    check(kept_q.size() == 0, "all kept words drained");
    check(n_skip > 0 && n_full > 0 && n_kept_evt > 0, "skipped events, full FIFO and kept events all happened");
    $display("kept=%0d skipped=%0d full=%0d", n_kept_evt, n_skip, n_full);
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
