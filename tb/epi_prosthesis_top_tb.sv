// epi_prosthesis_top_tb: end-to-end test of the whole digital chip at its
// default size (8 blocks x 16 stimulators x 4 channels = 512 channels,
// 2184-bit frames at 20 MHz).
//
// Every stimulator gets a behavioural model of its analog half (current
// drivers with random mismatch, sense resistors, comparator). The test
//   1. waits for the power-up calibration of all 128 stimulators and checks
//      each stored code against codes worked out here from the model values;
//   2. sends back-to-back frames, built here with their own CRC8, whose
//      amplitudes play a biphasic pulse with an interphase gap, a pulse that
//      walks through all five calibration regions, and arbitrary steps, with
//      a different time offset on every channel;
//   3. after every tick compares each channel's controls with a phase tracker
//      (anodic / interphase / cathodic / discharge), checks that the applied
//      codes are the stored ones for the amplitude's region, and that the
//      model's pmos and nmos currents then match within 2.5 uA (5% of the
//      50 uA full scale) at every amplitude used;
//   4. corrupts one frame (all channels must get zero), inserts idle gaps and
//      zeros (the receiver must find the next header; the tick keeps
//      running), switches to slave mode and feeds frames through the
//      external data input while the own stream carries garbage, and finally
//      requests a new calibration.
// It counts each of these mechanisms and fails if one never happened.
module epi_prosthesis_top_tb;
  import epi_pkg::*;

  localparam int NB = 8, NC = 16, NCH = CH_PER_STIM;
  localparam int FR = HDR_W + NC * (NB * WORD_W + CRC_W);

  logic clk = 0, rst_n = 0;
  logic data1 = 0, data2 = 0, slave_mode = 0, data_ext = 0, cal_req = 0;
  logic data_to_slave, cal_active, tick, frame_ok, crc_err;
  logic [NB-1:0] chain_out;
  logic [NB-1:0][NC-1:0] cmp;
  chan_ctrl_t [NB-1:0][NC-1:0][NCH-1:0] ch_ctrl;
  cal_ctrl_t [NB-1:0][NC-1:0] cal_ctrl;

  epi_prosthesis_top dut (.*);

  always #25 clk = ~clk;  // 20 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- analog models and expected calibration codes ----------
  int exp_n [NB][NC][NCH];
  int exp_p [NB][NC][NCH][N_CAL_PTS];
  int i_out [NB][NC][NCH];

  for (genvar b = 0; b < NB; b++) begin : g_b
    for (genvar k = 0; k < NC; k++) begin : g_k
      stim_analog_model #(.SEED(b * NC + k + 11)) u_m (
        .ctrl(ch_ctrl[b][k]), .cal_ctrl(cal_ctrl[b][k]), .cmp(cmp[b][k]), .i_out(i_out[b][k])
      );
      initial begin
        #1;
        for (int c = 0; c < NCH; c++) begin
          exp_n[b][k][c] = 31;
          for (int q = 31; q >= 0; q--) if (u_m.i_nmos(c, 0, q) * 75 < 35000) exp_n[b][k][c] = q;
          for (int p = 0; p < N_CAL_PTS; p++) begin
            exp_p[b][k][c][p] = 31;
            for (int q = 31; q >= 0; q--)
              if (u_m.i_pmos(c, 3 * p + 2, q) - u_m.i_nmos(c, 3 * p + 2, exp_n[b][k][c]) > 0)
                exp_p[b][k][c][p] = q;
          end
        end
      end
      // current matching whenever a phase is driven
      always @(negedge clk) begin
        for (int c = 0; c < NCH; c++)
          if ((ch_ctrl[b][k][c].pmos_on ^ ch_ctrl[b][k][c].nmos_on) && !cal_active) begin
            int d, ip, in_;
            d   = int'(ch_ctrl[b][k][c].din);
            ip  = u_m.i_pmos(c, d, int'(ch_ctrl[b][k][c].calp));
            in_ = u_m.i_nmos(c, d, int'(ch_ctrl[b][k][c].caln));
            match_checks++;
            if (ip - in_ > 2500 || in_ - ip > 2500) begin
              match_fail++;
              if (match_fail < 5) $display("mismatch b%0d k%0d c%0d d=%0d ip=%0d in=%0d", b, k, c, d, ip, in_);
            end
          end
      end
    end
  end
  int match_checks = 0, match_fail = 0;

  // ---------------- frame generation ----------------
  localparam int L = 26;
  int seq [L] = '{0, 9, 13, 14, 15, 15, 0, 15, 15, 15, 7, 7, 7, 0, 0,
                  2, 5, 8, 11, 14, 0, 0, 1, 4, 0, 0};

  typedef logic [NB-1:0][NC-1:0][NCH-1:0][DIN_W-1:0] amps_t;
  amps_t sent_q [$];
  amps_t cur;

  function automatic logic [7:0] crc_ref(input logic [NB*WORD_W-1:0] d);
    logic [7:0] r;
    r = 8'h00;
    for (int i = NB * WORD_W - 1; i >= 0; i--)
      r = (r[7] ^ d[i]) ? ((r << 1) ^ 8'h07) : (r << 1);
    return r;
  endfunction

  task automatic send_bit(input logic bv, input bit to_ext);
    if (to_ext) begin data_ext <= bv; data1 <= 1'($urandom); end
    else begin data1 <= bv; data_ext <= 1'($urandom); end
    data2 <= 1'($urandom);
    @(posedge clk);
  endtask

  task automatic send_frame(input amps_t a, input bit corrupt, input bit to_ext);
    logic [NB*WORD_W-1:0] dx;
    logic [7:0] crc;
    sent_q.push_back(a);
    for (int i = HDR_W - 1; i >= 0; i--) send_bit(HEADER[i], to_ext);
    for (int x = 0; x < NC; x++) begin
      for (int b = 0; b < NB; b++)
        for (int c = 0; c < NCH; c++)
          dx[(NB-1-b)*WORD_W + 4*c +: 4] = a[b][x][c];
      crc = crc_ref(dx);
      if (corrupt && x == NC - 1) dx[100] = ~dx[100];
      for (int i = NB * WORD_W - 1; i >= 0; i--) send_bit(dx[i], to_ext);
      for (int i = CRC_W - 1; i >= 0; i--) send_bit(crc[i], to_ext);
    end
  endtask

  function automatic amps_t frame_amps(input int s);
    amps_t a;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < NC; k++)
        for (int c = 0; c < NCH; c++)
          a[b][k][c] = DIN_W'(seq[(s + b * 7 + k * 3 + c * 5) % L]);
    return a;
  endfunction

  // ---------------- load tracking, phase tracker, checks --------------------
  int ph [NB][NC][NCH];
  int n_ok = 0, n_err = 0, n_tick = 0, n_gap_tick = 0, n_anodic = 0, n_inter = 0, n_cath = 0;
  int n_disch = 0, n_cal_done = 0, n_slave = 0, n_resync = 0;
  int n_region [N_CAL_PTS];
  bit loaded_since_tick = 0, stim = 0;

  // Monitors sample on the falling edge, away from the DUT's clock edge.
  always @(negedge clk) begin
    if (rst_n) begin
      if (frame_ok) begin
        n_ok++;
        if (slave_mode) n_slave++;
        cur = sent_q.pop_front();
        loaded_since_tick = 1;
      end
      if (crc_err) begin
        n_err++;
        cur = sent_q.pop_front();
        for (int b = 0; b < NB; b++) for (int k = 0; k < NC; k++) for (int c = 0; c < NCH; c++) cur[b][k][c] = '0;
      end
      if (tick) begin
        n_tick++;
        if (!loaded_since_tick && stim) n_gap_tick++;
        loaded_since_tick = 0;
        if (stim) fork check_after_tick(); join_none
      end
    end
  end

  task automatic check_after_tick();
    @(negedge clk);
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < NC; k++)
        for (int c = 0; c < NCH; c++) begin
          int d, p;
          chan_ctrl_t x;
          d = int'(cur[b][k][c]);
          p = ph[b][k][c];
          case (p)
            0: p = d != 0 ? 1 : 0;
            1: p = d != 0 ? 1 : 2;
            2: p = d != 0 ? 3 : 2;
            default: p = d != 0 ? 3 : 0;
          endcase
          if (p == 1 && ph[b][k][c] != 1) n_anodic++;
          if (p == 2 && ph[b][k][c] != 2) n_inter++;
          if (p == 3 && ph[b][k][c] != 3) n_cath++;
          if (p == 0 && ph[b][k][c] == 3) n_disch++;
          ph[b][k][c] = p;
          x = ch_ctrl[b][k][c];
          case (p)
            1: check(x.pmos_on && !x.nmos_on && x.sw_elec && !x.sw_short && int'(x.din) == d, "anodic phase");
            3: check(!x.pmos_on && x.nmos_on && x.sw_elec && !x.sw_short && int'(x.din) == d, "cathodic phase");
            2: check(!x.pmos_on && !x.nmos_on && !x.sw_elec && !x.sw_short, "interphase");
            default: check(!x.pmos_on && !x.nmos_on && !x.sw_elec && x.sw_short, "discharge/rest");
          endcase
          check(int'(x.caln) == exp_n[b][k][c], "nmos code applied");
          if (p == 1 || p == 3) begin
            int r;
            r = (d - 1) / 3;
            n_region[r]++;
            check(int'(x.calp) == exp_p[b][k][c][r], "pmos code of region applied");
          end
        end
  endtask

  task automatic wait_calibration(input string tag);
    int t;
    t = 0;
    while (!cal_active && t < 10) begin @(posedge clk); t++; end
    check(cal_active, {tag, ": calibration running"});
    while (cal_active) send_bit(1'b0, 1'b0);
    n_cal_done++;
    $display("%s calibration finished at %0t", tag, $time);
  endtask

  initial begin
    for (int r = 0; r < N_CAL_PTS; r++) n_region[r] = 0;
    for (int b = 0; b < NB; b++) for (int k = 0; k < NC; k++) for (int c = 0; c < NCH; c++) begin
      ph[b][k][c] = 0;
      cur[b][k][c] = '0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait_calibration("power-up");
    stim = 1;

    // back-to-back frames
    for (int s = 0; s < 30; s++) send_frame(frame_amps(s), 1'b0, 1'b0);
    // corrupted frame: everyone gets zero
    send_frame(frame_amps(30), 1'b1, 1'b0);
    // idle gap, then resynchronise
    for (int i = 0; i < FR + 500; i++) send_bit(1'b0, 1'b0);
    for (int s = 31; s < 40; s++) send_frame(frame_amps(s), 1'b0, 1'b0);
    n_resync = n_ok;
    // slave mode: data from the master's stream
    slave_mode <= 1'b1;
    for (int s = 40; s < 56; s++) send_frame(frame_amps(s), 1'b0, 1'b1);
    slave_mode <= 1'b0;
    repeat (40) send_bit(1'b0, 1'b0);
    check(data_to_slave == data2, "second stream forwarded to slave");
    stim = 0;

    // re-calibration on request
    @(posedge tick);
    cal_req <= 1'b1;
    @(posedge clk);
    @(posedge tick);
    @(posedge clk);
    cal_req <= 1'b0;
    wait_calibration("requested");
    repeat (5) @(posedge clk);

    $display("frames ok=%0d crc_err=%0d ticks=%0d gap_ticks=%0d slave_frames=%0d", n_ok, n_err, n_tick, n_gap_tick, n_slave);
    $display("anodic=%0d interphase=%0d cathodic=%0d discharge=%0d calibrations=%0d", n_anodic, n_inter, n_cath, n_disch, n_cal_done);
    $display("region uses %0d %0d %0d %0d %0d, current match checks %0d (fail %0d)",
             n_region[0], n_region[1], n_region[2], n_region[3], n_region[4], match_checks, match_fail);
    check(n_ok == 30 + 9 + 16, "all good frames loaded");
    check(n_err == 1, "corrupted frame discarded");
    check(n_resync >= 38, "receiver resynchronised after gap");
    check(n_gap_tick > 0, "tick ran during the gap");
    check(n_slave == 16, "slave-mode frames");
    check(n_anodic > 0 && n_inter > 0 && n_cath > 0 && n_disch > 0, "all stimulation phases seen");
    for (int r = 0; r < N_CAL_PTS; r++) check(n_region[r] > 0, $sformatf("calibration region %0d used", r));
    check(n_cal_done == 2, "power-up and requested calibration");
    checks += match_checks;
    failures += match_fail;
    check(match_checks > 0, "current matching exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
