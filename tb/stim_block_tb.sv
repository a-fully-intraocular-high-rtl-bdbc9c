// stim_block_tb: one block of 16 stimulators at its default size, each with
// a behavioural analog model. Checks that all 16 stimulators calibrate in
// parallel after reset, that a 256-bit word stream shifted into the chain
// lands in the right stimulator and channel (the first 16 bits in column c0,
// channel c on bits [4c+3:4c]), that the chain output returns the stream 256
// shifts later, and that clearing the chain before a load gives every channel
// zero.
module stim_block_tb;
  import epi_pkg::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0, tick = 0, shift_en = 0, chain_clr = 0, load = 0, chain_in = 0, cal_req = 0;
  logic chain_out;
  logic [NC-1:0] cmp, cal_mode;
  chan_ctrl_t [NC-1:0][CH_PER_STIM-1:0] ctrl;
  cal_ctrl_t [NC-1:0] cal_ctrl;
  int checks = 0, failures = 0;

  stim_block dut (.*);
  always #5 clk = ~clk;

  for (genvar k = 0; k < NC; k++) begin : g_m
    int io [CH_PER_STIM];
    stim_analog_model #(.SEED(k + 101)) u_m (.ctrl(ctrl[k]), .cal_ctrl(cal_ctrl[k]), .cmp(cmp[k]), .i_out(io));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_tick();
    tick <= 1; @(posedge clk); tick <= 0; @(posedge clk); #1;
  endtask

  logic [NC-1:0][WORD_W-1:0] words, prev;
  logic [NC*WORD_W-1:0] out_bits;

  // shift all words: column 0's word first, MSB first; collect chain_out
  task automatic send_words();
    int n;
    n = 0;
    for (int k = 0; k < NC; k++)
      for (int i = WORD_W - 1; i >= 0; i--) begin
        chain_in <= words[k][i]; shift_en <= 1;
        #1 out_bits[NC*WORD_W-1-n] = chain_out;
        n++;
        @(posedge clk);
      end
    shift_en <= 0;
    load <= 1; @(posedge clk); load <= 0; @(posedge clk);
  endtask

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    do_tick();
    do_tick();
    check(&cal_mode, "all stimulators calibrating");
    for (int k = 0; k < NC; k++) check(cal_ctrl[k].rh_en, "all calibration circuits in step 1 together");
    t = 0;
    while (|cal_mode && t < 3000) begin do_tick(); t++; end
    check(cal_mode == '0, "calibration finished");
    prev = '0;
    for (int f = 0; f < 7; f++) begin
      for (int k = 0; k < NC; k++)
        for (int c = 0; c < CH_PER_STIM; c++)
          words[k][4*c +: 4] = (f % 2 == 0) ? 4'(1 + $urandom % 15) : 4'h0;
      send_words();
      if (f > 0)
        for (int k = 0; k < NC; k++)
          for (int i = WORD_W - 1; i >= 0; i--)
            check(out_bits[NC*WORD_W-1 - (k*WORD_W + WORD_W-1-i)] == prev[k][i], "chain output returns previous stream");
      prev = words;
      do_tick();
      for (int k = 0; k < NC; k++)
        for (int c = 0; c < CH_PER_STIM; c++)
          if (f % 2 == 0) check(ctrl[k][c].din == words[k][4*c +: 4] && ctrl[k][c].sw_elec &&
                                (ctrl[k][c].pmos_on ^ ctrl[k][c].nmos_on), $sformatf("col %0d ch %0d phase data", k, c));
          else check(!ctrl[k][c].pmos_on && !ctrl[k][c].nmos_on, "zeros stop the current");
    end
    for (int k = 0; k < NC; k++) words[k] = 16'hFFFF;
    for (int k = 0; k < NC; k++)
      for (int i = WORD_W - 1; i >= 0; i--) begin
        chain_in <= 1; shift_en <= 1; @(posedge clk);
      end
    shift_en <= 0;
    chain_clr <= 1; @(posedge clk); chain_clr <= 0;
    load <= 1; @(posedge clk); load <= 0;
    do_tick(); do_tick();
    for (int k = 0; k < NC; k++)
      for (int c = 0; c < CH_PER_STIM; c++)
        check(!ctrl[k][c].pmos_on && !ctrl[k][c].nmos_on && ctrl[k][c].sw_short, "cleared chain gives rest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
