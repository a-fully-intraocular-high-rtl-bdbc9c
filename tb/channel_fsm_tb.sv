// channel_fsm_tb: plays the amplitude sequence of the arbitrary-waveform
// figure (0, 9, D, E, F, F, 0, F, F, F, 7, 7, 7, 0) and a long random sequence,
// and checks state and amplitude after every tick against a table and a
// phase tracker. Also checks that nothing moves without a tick, that the
// amplitude appears one tick after it is presented, and that hold forces rest.
module channel_fsm_tb;
  import epi_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, hold = 0;
  logic [DIN_W-1:0] din = 0, amp;
  chan_state_t state;
  int checks = 0, failures = 0;

  channel_fsm dut (.*);
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

  task automatic step(input int d);
    din <= DIN_W'(d);
    @(posedge clk);
    // a few idle cycles without tick: no change
    repeat (2) @(posedge clk);
    tick <= 1; @(posedge clk); tick <= 0; @(posedge clk); #1;
  endtask

  int fd [15] = '{0, 9, 13, 14, 15, 15, 0, 15, 15, 15, 7, 7, 7, 0, 0};
  chan_state_t fs [15] = '{CH_REST, CH_PHASE1, CH_PHASE1, CH_PHASE1, CH_PHASE1, CH_PHASE1,
                           CH_INTER, CH_PHASE2, CH_PHASE2, CH_PHASE2, CH_PHASE2, CH_PHASE2,
                           CH_PHASE2, CH_REST, CH_REST};

  initial begin
    int p, d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(state == CH_REST && amp == 0, "reset state");
    din <= 4'hF; repeat (4) @(posedge clk); #1;
    check(state == CH_REST, "no move without tick");
    for (int s = 0; s < 15; s++) begin
      step(fd[s]);
      check(state == fs[s], $sformatf("figure step %0d state", s));
      check(int'(amp) == fd[s], $sformatf("figure step %0d amplitude", s));
    end
    p = 0;
    for (int s = 0; s < 300; s++) begin
      d = ($urandom % 2) ? 0 : int'($urandom % 16);
      step(d);
      case (p)
        0: p = d != 0 ? 1 : 0;
        1: p = d != 0 ? 1 : 2;
        2: p = d != 0 ? 3 : 2;
        default: p = d != 0 ? 3 : 0;
      endcase
      check(int'(state) == p, "random sequence state");
      check(int'(amp) == d, "random sequence amplitude");
    end
    step(5);
    hold <= 1; step(5);
    check(state == CH_REST && amp == 0, "hold forces rest");
    hold <= 0; step(5);
    check(state == CH_PHASE1, "restart after hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
