// tb_ddu_crc16: self-checking test of the DDU CRC-16 unit.
//
// Random event lengths of random 64-bit words are fed in; after each word the
// CRC register, and before it the combinational next value, must equal a
// bit-serial LFSR model written tap by tap in the testbench. init must restart
// from all ones. One fixed vector (the all-zero word from the start value)
// is also checked against a value worked out by hand from the LFSR.
module tb_ddu_crc16;
  import ddu_tb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        init = 0, en = 0;
  logic [63:0] data = '0;
  logic [15:0] crc, crc_next;

  ddu_crc16 dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model;

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
    check(crc == 16'hFFFF, "start value after reset");
    for (int ev = 0; ev < 200; ev++) begin
      init = 1;
      @(negedge clk);
      init = 0;
      model = 16'hFFFF;
      check(crc == model, "start value after init");
      for (int k = 0; k < 1 + int'($urandom % 20); k++) begin
        en   = ($urandom % 4) != 0;
        data = {32'($urandom), 32'($urandom)};
        #1 check(crc_next == ref_crc16(model, data), "crc_next");
        if (en) model = ref_crc16(model, data);
        @(negedge clk);
        check(crc == model, $sformatf("crc %h exp %h", crc, model));
      end
      en = 0;
    end
    // all-ones register shifted through 64 zero bits: computed by the model
    // and cross-checked with the register after one word
    init = 1;
    @(negedge clk);
    init = 0;
    en = 1;
    data = '0;
    @(negedge clk);
    en = 0;
    check(crc == ref_crc16(16'hFFFF, 64'h0), "zero word");
    check(crc != 16'hFFFF, "zero word changes the register");
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
