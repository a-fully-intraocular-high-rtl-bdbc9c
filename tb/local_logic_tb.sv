// local_logic_tb: self-checking test of one stimulator's local logic against
// the behavioural analog model.
//
// 1. After reset the block must calibrate all four channels within the
//    worst-case 4 x 6 x 32 + 2 ticks. Expected codes are worked out here from
//    the model's mismatch values: step 1 stores the smallest nmos code that
//    brings the offset below 35 mV / 75 kOhm, step 2 the smallest pmos code
//    that makes Ipmos exceed Inmos at the region's calibration point.
// 2. Stimulation: channel 0 plays the amplitude sequence of the waveform
//    figure (0, 9, D, E, F, F, 0, F, F, F, 7, 7, 7, 0) and is checked against a
//    hand-written table; channels 1..3 play random sequences checked against a
//    phase tracker; every phase checks that the codes applied are the stored
//    ones for the amplitude's region.
// 3. The serial output passes the stage on after 16 shifts; a chain clear
//    followed by a load gives zero inputs; a calibration request re-runs the
//    calibration.
module local_logic_tb;
  import epi_pkg::*;

  logic clk = 0, rst_n = 0, tick = 0, shift_en = 0, chain_clr = 0, load = 0, sdi = 0;
  logic sdo, cal_req = 0, cmp, cal_mode;
  chan_ctrl_t [CH_PER_STIM-1:0] ctrl;
  cal_ctrl_t cal_ctrl;
  int i_out [CH_PER_STIM];
  int checks = 0, failures = 0;

  local_logic dut (.*);
  stim_analog_model #(.SEED(3)) u_model (.ctrl, .cal_ctrl, .cmp, .i_out);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_tick();
    tick <= 1'b1;
    @(posedge clk);
    tick <= 1'b0;
    @(posedge clk);
    #1;
  endtask

  task automatic shift_word(input logic [WORD_W-1:0] w);
    for (int i = WORD_W - 1; i >= 0; i--) begin
      sdi <= w[i];
      shift_en <= 1'b1;
      @(posedge clk);
    end
    shift_en <= 1'b0;
    load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    @(posedge clk);
  endtask

  // Expected calibration codes from the model's mismatch values.
  int exp_n [CH_PER_STIM];
  int exp_p [CH_PER_STIM][N_CAL_PTS];

  function automatic int inm(int c, int d, int k);
    int v;
    v = d * u_model.lsb_n[c] + u_model.off_n[c] - k * 1000;
    return v < 0 ? 0 : v;
  endfunction
  function automatic int ipm(int c, int d, int k);
    int v;
    v = d * u_model.lsb_p[c] - u_model.off_p[c] + (k - 16) * 1000;
    return v < 0 ? 0 : v;
  endfunction

  task automatic compute_expected();
    for (int c = 0; c < int'(CH_PER_STIM); c++) begin
      exp_n[c] = 31;
      for (int k = 31; k >= 0; k--) if (inm(c, 0, k) * 75 < 35000) exp_n[c] = k;
      for (int p = 0; p < int'(N_CAL_PTS); p++) begin
        int d;
        d = 3 * p + 2;
        exp_p[c][p] = 31;
        for (int k = 31; k >= 0; k--) if (ipm(c, d, k) - inm(c, d, exp_n[c]) > 0) exp_p[c][p] = k;
      end
    end
  endtask

  function automatic int region_of(int d);
    return d == 0 ? 0 : (d - 1) / 3;
  endfunction

  int ticks;
  task automatic run_calibration(input string tag);
    ticks = 0;
    while (cal_mode && ticks < 2000) begin
      if (cal_ctrl.rh_en) check(!cal_ctrl.vref_zero && !cal_ctrl.rl_en, {tag, " step1 sense setup"});
      if (cal_ctrl.rl_en) check(cal_ctrl.vref_zero, {tag, " step2 sense setup"});
      for (int c = 0; c < int'(CH_PER_STIM); c++) if (ctrl[c].sw_cal) check(!ctrl[c].sw_elec, {tag, " electrode isolated"});
      do_tick();
      ticks++;
    end
    check(!cal_mode, {tag, " calibration ends"});
    check(ticks <= 4 * 6 * 32 + 2, {tag, " calibration tick budget"});
    $display("%s calibration took %0d ticks", tag, ticks);
  endtask

  // Phase tracker for the random-sequence channels: 0 rest, 1 first, 2 inter, 3 second.
  int ph [CH_PER_STIM];
  function automatic int next_ph(int p, int d);
    if (p == 0) return d != 0 ? 1 : 0;
    if (p == 1) return d != 0 ? 1 : 2;
    if (p == 2) return d != 0 ? 3 : 2;
    return d != 0 ? 3 : 0;
  endfunction

  task automatic check_channel(int c, int p, int d, string tag);
    case (p)
      1: check(ctrl[c].pmos_on && !ctrl[c].nmos_on && ctrl[c].sw_elec && !ctrl[c].sw_short &&
               ctrl[c].hv_hi_swing && ctrl[c].vg_anodic && ctrl[c].din == DIN_W'(d), {tag, " anodic"});
      3: check(!ctrl[c].pmos_on && ctrl[c].nmos_on && ctrl[c].sw_elec && !ctrl[c].sw_short &&
               ctrl[c].hv_hi_swing && !ctrl[c].vg_anodic && ctrl[c].din == DIN_W'(d), {tag, " cathodic"});
      2: check(!ctrl[c].pmos_on && !ctrl[c].nmos_on && !ctrl[c].sw_elec && !ctrl[c].sw_short &&
               ctrl[c].prot_clr, {tag, " interphase"});
      default: check(!ctrl[c].pmos_on && !ctrl[c].nmos_on && !ctrl[c].sw_elec && ctrl[c].sw_short,
               {tag, " rest/discharge"});
    endcase
    check(int'(ctrl[c].caln) == exp_n[c], {tag, " caln applied"});
    if (p == 1 || p == 3)
      check(int'(ctrl[c].calp) == exp_p[c][region_of(d)], {tag, " calp region"});
  endtask

  // Fig. 17 sequence and the expected phase after each step.
  localparam int N_F17 = 15;
  int f17_d [N_F17] = '{0, 9, 13, 14, 15, 15, 0, 15, 15, 15, 7, 7, 7, 0, 0};
  int f17_p [N_F17] = '{0, 1, 1, 1, 1, 1, 2, 3, 3, 3, 3, 3, 3, 0, 0};

  initial begin
    logic [WORD_W-1:0] w;
    int dd [CH_PER_STIM];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    compute_expected();
    check(cal_mode, "calibration after reset");
    run_calibration("power-up");

    // Calibration quality: at each point |Idiff| below one calibration step.
    for (int c = 0; c < int'(CH_PER_STIM); c++) begin
      check(inm(c, 0, exp_n[c]) * 75 < 35000 || exp_n[c] == 31, "nmos offset cancelled");
      for (int p = 0; p < int'(N_CAL_PTS); p++) begin
        int diff;
        diff = ipm(c, 3 * p + 2, exp_p[c][p]) - inm(c, 3 * p + 2, exp_n[c]);
        check((diff > 0 && diff <= 1000) || exp_p[c][p] == 0 || exp_p[c][p] == 31, "matched within 1 uA");
      end
    end

    // Stimulation
    for (int c = 0; c < int'(CH_PER_STIM); c++) ph[c] = 0;
    for (int s = 0; s < 60; s++) begin
      dd[0] = s < N_F17 ? f17_d[s] : 0;
      for (int c = 1; c < int'(CH_PER_STIM); c++)
        dd[c] = ($urandom % 3 == 0) ? 0 : int'($urandom % 16);
      w = '0;
      for (int c = 0; c < int'(CH_PER_STIM); c++) w[4*c +: 4] = 4'(dd[c]);
      shift_word(w);
      do_tick();
      for (int c = 0; c < int'(CH_PER_STIM); c++) ph[c] = next_ph(ph[c], dd[c]);
      if (s < N_F17) check(ph[0] == f17_p[s], "tracker agrees with waveform figure");
      for (int c = 0; c < int'(CH_PER_STIM); c++) check_channel(c, ph[c], dd[c], $sformatf("step %0d ch%0d", s, c));
      // exercise the current model: anodic positive, cathodic negative
      if (ph[1] == 1 && dd[1] > 2) check(i_out[1] > 0, "anodic current sign");
      if (ph[1] == 3 && dd[1] > 0) check(i_out[1] < 0, "cathodic current sign");
    end

    // Serial cascade: after 16 more shifts the old stage appears on sdo.
    w = 16'hC3A5;
    shift_word(w);
    for (int i = WORD_W - 1; i >= 0; i--) begin
      check(sdo == w[i], "serial out");
      sdi <= 1'b0; shift_en <= 1'b1; @(posedge clk); #1;
    end
    shift_en <= 1'b0;

    // Clear + load gives zeros.
    shift_word(16'hFFFF);
    chain_clr <= 1'b1; @(posedge clk); chain_clr <= 1'b0;
    load <= 1'b1; @(posedge clk); load <= 1'b0; @(posedge clk);
    do_tick(); do_tick(); do_tick();
    for (int c = 0; c < int'(CH_PER_STIM); c++) check(dut.din[c] == '0, "cleared input");

    // Re-calibration on request.
    cal_req <= 1'b1;
    do_tick();
    cal_req <= 1'b0;
    do_tick();
    check(cal_mode, "calibration request honoured");
    run_calibration("requested");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
