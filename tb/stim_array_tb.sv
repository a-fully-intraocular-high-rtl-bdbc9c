// stim_array_tb: the stimulator array at a reduced size (3 blocks of 4
// stimulators) with behavioural analog models. Checks that the array
// calibrates after reset, that each block's data line reaches only that
// block's stimulators (a different random stream per block, checked per
// block, column and channel after load and tick), and that a calibration
// request reaches every stimulator.
module stim_array_tb;
  import epi_pkg::*;
  localparam int NB = 3, NC = 4;
  logic clk = 0, rst_n = 0, tick = 0, shift_en = 0, chain_clr = 0, load = 0, cal_req = 0;
  logic [NB-1:0] sdata = '0, chain_out;
  logic [NB-1:0][NC-1:0] cmp, cal_mode;
  chan_ctrl_t [NB-1:0][NC-1:0][CH_PER_STIM-1:0] ctrl;
  cal_ctrl_t [NB-1:0][NC-1:0] cal_ctrl;
  int checks = 0, failures = 0;

  stim_array #(.N_BLOCKS(NB), .N_COLS(NC)) dut (.*);
  always #5 clk = ~clk;

  for (genvar b = 0; b < NB; b++) begin : g_b
    for (genvar k = 0; k < NC; k++) begin : g_k
      int io [CH_PER_STIM];
      stim_analog_model #(.SEED(b * 31 + k + 7)) u_m (.ctrl(ctrl[b][k]), .cal_ctrl(cal_ctrl[b][k]), .cmp(cmp[b][k]), .i_out(io));
    end
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

  task automatic wait_cal();
    int t;
    t = 0;
    while (|cal_mode && t < 3000) begin do_tick(); t++; end
    check(cal_mode == '0, "calibration finished");
  endtask

  logic [NB-1:0][NC-1:0][WORD_W-1:0] words;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    do_tick();
    check(&cal_mode, "all stimulators calibrating after reset");
    wait_cal();
    for (int f = 0; f < 4; f++) begin
      for (int b = 0; b < NB; b++) for (int k = 0; k < NC; k++) for (int c = 0; c < CH_PER_STIM; c++)
        words[b][k][4*c +: 4] = (f % 2 == 0) ? 4'(1 + $urandom % 15) : 4'h0;
      for (int k = 0; k < NC; k++)
        for (int i = WORD_W - 1; i >= 0; i--) begin
          for (int b = 0; b < NB; b++) sdata[b] <= words[b][k][i];
          shift_en <= 1; @(posedge clk);
        end
      shift_en <= 0;
      load <= 1; @(posedge clk); load <= 0; @(posedge clk);
      do_tick();
      for (int b = 0; b < NB; b++) for (int k = 0; k < NC; k++) for (int c = 0; c < CH_PER_STIM; c++)
        if (f % 2 == 0)
          check(ctrl[b][k][c].din == words[b][k][4*c +: 4] && (ctrl[b][k][c].pmos_on ^ ctrl[b][k][c].nmos_on),
                $sformatf("block %0d col %0d ch %0d data", b, k, c));
        else
          check(!ctrl[b][k][c].pmos_on && !ctrl[b][k][c].nmos_on, "zero amplitude, no current");
    end
    cal_req <= 1; do_tick(); cal_req <= 0; do_tick();
    check(&cal_mode, "calibration request reaches every stimulator");
    wait_cal();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
