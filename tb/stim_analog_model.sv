// stim_analog_model: behavioural model (testbench only) of the analog half of
// one 4-channel stimulator: four current drivers with process mismatch and the
// shared calibration circuit (RH/RL sense resistors, Vref, comparator).
//
// Currents are integers in nA. For channel c with input code d:
//   Inmos = max(0, d*lsb_n[c] + off_n[c] - caln*1000)
//   Ipmos = max(0, d*lsb_p[c] - off_p[c] + (calp-16)*1000)
// (each calibration DAC step is Irefcal = 1 uA). The nominal LSB is 3333 nA
// (15 codes = 50 uA full scale); gains differ by up to +-300 nA per code, the
// nmos source has a positive offset of 0.6..20 uA and the pmos source a dead
// zone of 0..3 uA, drawn from a small generator seeded by SEED. The output
// current of a channel is Ipmos (if on) minus Inmos (if on). The comparator
// adds up the currents of the channels switched to the calibration node,
// converts them with RH = 75 kOhm or RL = 15 kOhm into uV and reports 1 when
// that voltage is above Vref (-35 mV, or 0 V in step 2). It is combinational.
module stim_analog_model
  import epi_pkg::*;
#(
  parameter int unsigned SEED = 1
) (
  input  chan_ctrl_t [CH_PER_STIM-1:0] ctrl,
  input  cal_ctrl_t                    cal_ctrl,
  output logic                         cmp,
  output int                           i_out [CH_PER_STIM]
);

  int lsb_n [CH_PER_STIM];
  int lsb_p [CH_PER_STIM];
  int off_n [CH_PER_STIM];
  int off_p [CH_PER_STIM];

  function automatic int unsigned lcg(inout int unsigned s);
    s = s * 32'd1103515245 + 32'd12345;
    return s >> 8;
  endfunction

  initial begin
    int unsigned s;
    s = SEED * 32'd2654435761 + 32'd7;
    for (int c = 0; c < int'(CH_PER_STIM); c++) begin
      lsb_n[c] = 3033 + int'(lcg(s) % 601);
      lsb_p[c] = 3033 + int'(lcg(s) % 601);
      off_n[c] = 600 + int'(lcg(s) % 19401);
      off_p[c] = int'(lcg(s) % 3001);
    end
  end

  function automatic int i_nmos(int c, int d, int caln);
    int v;
    v = d * lsb_n[c] + off_n[c] - caln * 1000;
    return (v < 0) ? 0 : v;
  endfunction

  function automatic int i_pmos(int c, int d, int calp);
    int v;
    v = d * lsb_p[c] - off_p[c] + (calp - 16) * 1000;
    return (v < 0) ? 0 : v;
  endfunction

  always_comb begin
    int sum, v_uv, vref_uv;
    sum = 0;
    for (int c = 0; c < int'(CH_PER_STIM); c++) begin
      i_out[c] = (ctrl[c].pmos_on ? i_pmos(c, int'(ctrl[c].din), int'(ctrl[c].calp)) : 0)
               - (ctrl[c].nmos_on ? i_nmos(c, int'(ctrl[c].din), int'(ctrl[c].caln)) : 0);
      if (ctrl[c].sw_cal) sum += i_out[c];
    end
    vref_uv = cal_ctrl.vref_zero ? 0 : -35000;
    if (cal_ctrl.rh_en)      v_uv = sum * 75;
    else if (cal_ctrl.rl_en) v_uv = sum * 15;
    else                     v_uv = 0;
    cmp = (cal_ctrl.rh_en || cal_ctrl.rl_en) && (v_uv > vref_uv);
  end

endmodule
