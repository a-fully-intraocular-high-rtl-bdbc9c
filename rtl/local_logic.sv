// local_logic: digital controller of one self-calibrating 4-channel stimulator.
//
// Four channels share one local logic and one calibration circuit, yet each
// channel is calibrated and stimulates independently. The block holds:
//   - scan_reg: its 16-bit stage of the block's scan chain and the input
//     register of four 4-bit amplitudes (20 MHz clock);
//   - ll_arbiter: calibration after reset (or on request), then stimulation;
//   - four channel_fsm: the stimulation phase of each channel;
//   - cal_fsm: the serial two-step, five-point calibration;
//   - the calibration registers: one 5-bit nmos code and five 5-bit pmos codes
//     per channel (120 bits).
// The state machines advance only on `tick`, the low-rate local clock (about
// 10 kHz, one per 109.2 us time step), so the whole block is one clock domain.
//
// Outputs: one chan_ctrl_t per channel for its analog current driver, and one
// cal_ctrl_t for the shared calibration circuit; input `cmp` is that
// circuit's comparator decision. During calibration the channel under test is
// connected to the calibration circuit (its electrode shorted to ground),
// the others are off with electrodes shorted. During stimulation each channel
// drives its amplitude on its pmos (first phase) or nmos (second phase)
// source, with the nmos code and the pmos code of the region its amplitude
// falls in. Between phases the driver is disconnected and the protection
// transistors are discharged; in the rest/discharge state the electrode is
// shorted to ground.
//
// The partition into arbiter, four channel machines and one calibration
// machine follows the document. The switch settings per state, the bias
// selections and the register layout are this design's own choices where the
// document describes the analog side only.
module local_logic
  import epi_pkg::*;
(
  input  logic                         clk,       // 20 MHz
  input  logic                         rst_n,
  input  logic                         tick,      // local-logic clock enable
  input  logic                         shift_en,
  input  logic                         chain_clr,
  input  logic                         load,
  input  logic                         sdi,       // DataIn
  output logic                         sdo,       // DataOut
  input  logic                         cal_req,
  input  logic                         cmp,       // calibration comparator
  output chan_ctrl_t [CH_PER_STIM-1:0] ctrl,
  output cal_ctrl_t                    cal_ctrl,
  output logic                         cal_mode   // calibration in progress
);

  logic [CH_PER_STIM-1:0][DIN_W-1:0] din;
  logic                              cal_start, cal_done, cal_busy;
  logic [1:0]                        cal_ch;
  logic                              cal_step2;
  logic [2:0]                        cal_pt;
  logic [CAL_W-1:0]                  cal_code;
  logic                              wr_n, wr_p;

  chan_state_t      st  [CH_PER_STIM];
  logic [DIN_W-1:0] amp [CH_PER_STIM];

  logic [CH_PER_STIM-1:0][CAL_W-1:0]                caln_q;
  logic [CH_PER_STIM-1:0][N_CAL_PTS-1:0][CAL_W-1:0] calp_q;

  scan_reg u_scan (
    .clk, .rst_n, .shift_en, .clr(chain_clr), .load, .sdi, .sdo, .din
  );

  ll_arbiter u_arb (
    .clk, .rst_n, .tick, .cal_req, .cal_done, .cal_start, .cal_mode
  );

  cal_fsm u_cal (
    .clk, .rst_n, .tick, .start(cal_start), .cmp, .busy(cal_busy), .done(cal_done),
    .ch(cal_ch), .step2(cal_step2), .point(cal_pt), .code(cal_code), .wr_n, .wr_p
  );

  for (genvar c = 0; c < CH_PER_STIM; c++) begin : g_ch
    channel_fsm u_fsm (
      .clk, .rst_n, .tick, .hold(cal_mode), .din(din[c]), .state(st[c]), .amp(amp[c])
    );
  end

  // Calibration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      caln_q <= '0;
      calp_q <= {(CH_PER_STIM*N_CAL_PTS){CALP_ZERO}};
    end else begin
      if (wr_n) caln_q[cal_ch] <= cal_code;
      if (wr_p) calp_q[cal_ch][cal_pt] <= cal_code;
    end
  end

  // Driver controls
  always_comb begin
    cal_ctrl = '0;
    if (cal_busy) begin
      cal_ctrl.rh_en     = !cal_step2;
      cal_ctrl.rl_en     = cal_step2;
      cal_ctrl.vref_zero = cal_step2;
    end

    for (int c = 0; c < int'(CH_PER_STIM); c++) begin
      ctrl[c]           = '0;
      ctrl[c].caln      = caln_q[c];
      ctrl[c].calp      = calp_q[c][cal_region(amp[c])];
      ctrl[c].vg_anodic = 1'b1;
      if (cal_mode) begin
        ctrl[c].sw_short = 1'b1;
        ctrl[c].prot_clr = 1'b1;
        if (cal_busy && cal_ch == 2'(c)) begin
          ctrl[c].sw_cal   = 1'b1;
          ctrl[c].nmos_on  = 1'b1;
          ctrl[c].pmos_on  = cal_step2;
          ctrl[c].din      = cal_step2 ? point_din(cal_pt) : '0;
          ctrl[c].caln     = cal_step2 ? caln_q[c] : cal_code;
          ctrl[c].calp     = cal_step2 ? cal_code : CALP_ZERO;
          ctrl[c].prot_clr = 1'b0;
        end
      end else begin
        unique case (st[c])
          CH_PHASE1: begin
            ctrl[c].din         = amp[c];
            ctrl[c].pmos_on     = 1'b1;
            ctrl[c].sw_elec     = 1'b1;
            ctrl[c].hv_hi_swing = 1'b1;
          end
          CH_PHASE2: begin
            ctrl[c].din         = amp[c];
            ctrl[c].nmos_on     = 1'b1;
            ctrl[c].sw_elec     = 1'b1;
            ctrl[c].hv_hi_swing = 1'b1;
            ctrl[c].vg_anodic   = 1'b0;
          end
          CH_INTER: begin
            ctrl[c].prot_clr = 1'b1;
          end
          default: begin  // rest / discharge
            ctrl[c].sw_short = 1'b1;
            ctrl[c].prot_clr = 1'b1;
          end
        endcase
      end
    end
  end

endmodule
