// cal_fsm_tb: drives the calibration state machine with a comparator that
// switches when the code reaches a random threshold chosen per channel, step
// and point (some above 31, so the sweep saturates). It checks the order of
// the sweeps (channel 0..3; step 1, then step 2 at points 0..4), that each
// stored code is the threshold (or 31), the done strobe, and the number of
// ticks the calibration takes while busy: one per tried code.
module cal_fsm_tb;
  import epi_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, start = 0, cmp;
  logic busy, done, step2, wr_n, wr_p;
  logic [1:0] ch;
  logic [2:0] point;
  logic [CAL_W-1:0] code;
  int checks = 0, failures = 0;

  cal_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int thr [4][6];  // [channel][0: step 1, 1..5: step-2 points]
  assign cmp = busy && (int'(code) >= thr[ch][step2 ? int'(point) + 1 : 0]);

  int nwr = 0, ticks = 0, exp_ticks = 0, n_done = 0;
  always @(posedge clk) begin
    if (tick && busy) ticks++;
    if (done) n_done++;
    if (wr_n || wr_p) begin
      int idx, exp_code, exp_ch;
      exp_ch = nwr / 6;
      idx = nwr % 6;
      exp_code = thr[exp_ch][idx] > 31 ? 31 : thr[exp_ch][idx];
      check(int'(ch) == exp_ch, "channel order");
      check(wr_n == (idx == 0) && wr_p == (idx != 0), "step order");
      if (idx != 0) check(int'(point) == idx - 1, "point order");
      check(int'(code) == exp_code, "stored code");
      check(done == (nwr == 23), "done with last store");
      nwr++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < 6; i++) begin
        thr[c][i] = int'($urandom % 40);
        exp_ticks += (thr[c][i] > 31 ? 31 : thr[c][i]) + 1;
      end
    // no tick: nothing happens
    start <= 1; repeat (3) @(posedge clk); #1;
    check(!busy, "no start without tick");
    tick <= 1; @(posedge clk); tick <= 0; start <= 0;
    @(posedge clk); #1;
    check(busy && !step2 && ch == 0 && code == 0, "started");
    while (busy && ticks < 2000) begin
      repeat (3) @(posedge clk);
      tick <= 1; @(posedge clk); tick <= 0;
    end
    @(posedge clk);
    check(nwr == 24, "24 codes stored");
    check(n_done == 1, "one done strobe");
    check(ticks == exp_ticks, $sformatf("tick count %0d expected %0d", ticks, exp_ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
