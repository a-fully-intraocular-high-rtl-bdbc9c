// epi_prosthesis_top: digital part of the 512-channel self-calibrating
// epiretinal prosthesis chip.
//
// The chip's data telemetry recovers a 20 MHz clock from the 10 MHz power
// carrier and demodulates two PSK data streams (data1, data2). The global
// logic frames one stream, checks every column word's CRC8 and spreads the
// data over 8 scan chains, one per block of 16 four-channel stimulators. Each
// stimulator's local logic calibrates its four channels after reset and then
// turns the 4-bit amplitude sequence of each channel into biphasic or
// arbitrary current waveforms, one amplitude per 109.2 us frame.
//
// Two chips can work as master and slave for 1024 channels: the master uses
// data1 and forwards data2 to the slave (`data_to_slave`); a chip with
// `slave_mode` high takes its stream from `data_ext` instead of its own
// demodulator. `data_to_slave` is a plain wire from `data2`: the master
// only passes its second stream on and does not frame it. The analog parts (power telemetry, PLL, PSK demodulator,
// current drivers, calibration comparators) are outside this module: their
// digital controls and decisions are its ports, indexed [block][column]
// ([block][column][channel] for the drivers).
//
// The structure follows the document. Taking the stream selection as a
// simple multiplexer, and the global calibration request, are this design's
// own choices. Timing: all logic runs on `clk` (20 MHz); rx bits are sampled
// on every rising edge.
module epi_prosthesis_top
  import epi_pkg::*;
#(
  parameter int unsigned N_BLOCKS = 8,
  parameter int unsigned N_COLS   = 16,
  parameter int unsigned TICK_DIV = HDR_W + N_COLS * (N_BLOCKS * WORD_W + CRC_W)
) (
  input  logic                                                     clk,          // 20 MHz from the PLL
  input  logic                                                     rst_n,
  input  logic                                                     data1,        // demodulated stream 1
  input  logic                                                     data2,        // demodulated stream 2
  input  logic                                                     slave_mode,
  input  logic                                                     data_ext,     // stream from a master chip
  output logic                                                     data_to_slave,
  input  logic                                                     cal_req,
  input  logic       [N_BLOCKS-1:0][N_COLS-1:0]                    cmp,
  output chan_ctrl_t [N_BLOCKS-1:0][N_COLS-1:0][CH_PER_STIM-1:0]   ch_ctrl,
  output cal_ctrl_t  [N_BLOCKS-1:0][N_COLS-1:0]                    cal_ctrl,
  output logic                                                     cal_active,   // some stimulator calibrating
  output logic                                                     tick,
  output logic                                                     frame_ok,
  output logic                                                     crc_err,
  output logic       [N_BLOCKS-1:0]                                chain_out
);

  logic                 rx_data;
  logic [N_BLOCKS-1:0]  sdata;
  logic                 shift_en, chain_clr, load;
  logic [N_BLOCKS-1:0][N_COLS-1:0] cal_mode;

  assign rx_data       = slave_mode ? data_ext : data1;
  assign data_to_slave = data2;

  global_logic #(.N_BLOCKS(N_BLOCKS), .N_COLS(N_COLS), .TICK_DIV(TICK_DIV)) u_gl (
    .clk, .rst_n, .rx_data, .sdata, .shift_en, .chain_clr, .load, .tick, .frame_ok, .crc_err
  );

  stim_array #(.N_BLOCKS(N_BLOCKS), .N_COLS(N_COLS)) u_arr (
    .clk, .rst_n, .tick, .shift_en, .chain_clr, .load, .sdata, .chain_out,
    .cal_req, .cmp, .ctrl(ch_ctrl), .cal_ctrl, .cal_mode
  );

  assign cal_active = |cal_mode;

endmodule
