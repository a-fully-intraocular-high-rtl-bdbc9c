// scan_reg_tb: checks one scan-chain stage: serial shifting (MSB first, bit 15
// out on sdo after the word has passed), copy into the input register only on
// load, channel c on bits [4c+3:4c], and clear.
module scan_reg_tb;
  import epi_pkg::*;
  logic clk = 0, rst_n = 0, shift_en = 0, clr = 0, load = 0, sdi = 0, sdo;
  logic [CH_PER_STIM-1:0][DIN_W-1:0] din;
  int checks = 0, failures = 0;

  scan_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic shift_in(input logic [15:0] w);
    for (int i = 15; i >= 0; i--) begin
      sdi <= w[i]; shift_en <= 1; @(posedge clk);
    end
    shift_en <= 0; @(posedge clk); #1;
  endtask

  initial begin
    logic [15:0] a, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      shift_in(a);
      load <= 1; @(posedge clk); load <= 0; @(posedge clk); #1;
      for (int c = 0; c < 4; c++) check(din[c] == a[4*c +: 4], "channel nibble");
      // shift b in: a must leave on sdo, MSB first
      for (int i = 15; i >= 0; i--) begin
        check(sdo == a[i], "sdo order");
        sdi <= b[i]; shift_en <= 1; @(posedge clk); #1;
      end
      shift_en <= 0;
      @(posedge clk); #1;
      for (int c = 0; c < 4; c++) check(din[c] == a[4*c +: 4], "input held without load");
    end
    clr <= 1; @(posedge clk); clr <= 0; load <= 1; @(posedge clk); load <= 0; @(posedge clk); #1;
    check(din == '0 && sdo == 0, "clear then load gives zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
