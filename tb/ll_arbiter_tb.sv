// ll_arbiter_tb: after reset the arbiter must start calibration at the first
// tick, stay in calibration until done, switch to stimulation, ignore ticks
// without events, and restart calibration on a request.
module ll_arbiter_tb;
  logic clk = 0, rst_n = 0, tick = 0, cal_req = 0, cal_done = 0, cal_start, cal_mode;
  int checks = 0, failures = 0;
  int starts = 0;

  ll_arbiter dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (cal_start) starts++;

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

  task automatic do_tick(input bit done_in, input bit req);
    cal_done <= done_in; cal_req <= req; tick <= 1; @(posedge clk);
    tick <= 0; cal_done <= 0; cal_req <= 0; @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(cal_mode, "calibrating after reset");
    check(!cal_start, "start only with tick");
    do_tick(0, 0);
    check(starts == 1, "start strobe at first tick");
    repeat (10) do_tick(0, 0);
    check(cal_mode && starts == 1, "waits for done");
    do_tick(1, 0);
    check(!cal_mode, "stimulation after done");
    repeat (10) do_tick(0, 0);
    check(!cal_mode && starts == 1, "stays in stimulation");
    do_tick(0, 1);
    check(cal_mode, "request re-enters calibration");
    do_tick(0, 0);
    check(starts == 2, "second start strobe");
    do_tick(1, 0);
    check(!cal_mode, "back to stimulation");

    // Random inputs against a reference model: 0 start, 1 calibrate, 2 stimulate.
    begin
      int m, n0;
      bit t, d, r;
      m = 2;
      for (int i = 0; i < 400; i++) begin
        t = ($urandom % 2) == 0;
        d = ($urandom % 4) == 0;
        r = ($urandom % 5) == 0;
        n0 = starts;
        cal_done <= d; cal_req <= r; tick <= t; @(posedge clk); #1;
        check((starts != n0) == (t && m == 0), "start strobe only at a tick in the start state");
        if (t) begin
          if (m == 0) m = 1;
          else if (m == 1 && d) m = 2;
          else if (m == 2 && r) m = 0;
        end
        check(cal_mode == (m != 2), "mode follows reference");
      end
      tick <= 0; cal_done <= 0; cal_req <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
