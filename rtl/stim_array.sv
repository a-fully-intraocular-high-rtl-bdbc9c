// stim_array: the stimulator array, N_BLOCKS blocks of N_COLS four-channel
// stimulators (8 x 16 x 4 = 512 independent channels by default).
//
// Each block is one scan chain fed by its own data line from the global
// logic; all blocks shift, clear and load together and share the local tick
// and the calibration request. Controls and comparator inputs are indexed
// [block][column]. The organisation follows the document.
module stim_array
  import epi_pkg::*;
#(
  parameter int unsigned N_BLOCKS = 8,
  parameter int unsigned N_COLS   = 16
) (
  input  logic                                                     clk,
  input  logic                                                     rst_n,
  input  logic                                                     tick,
  input  logic                                                     shift_en,
  input  logic                                                     chain_clr,
  input  logic                                                     load,
  input  logic       [N_BLOCKS-1:0]                                sdata,
  output logic       [N_BLOCKS-1:0]                                chain_out,
  input  logic                                                     cal_req,
  input  logic       [N_BLOCKS-1:0][N_COLS-1:0]                    cmp,
  output chan_ctrl_t [N_BLOCKS-1:0][N_COLS-1:0][CH_PER_STIM-1:0]   ctrl,
  output cal_ctrl_t  [N_BLOCKS-1:0][N_COLS-1:0]                    cal_ctrl,
  output logic       [N_BLOCKS-1:0][N_COLS-1:0]                    cal_mode
);

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    stim_block #(.N_COLS(N_COLS)) u_blk (
      .clk, .rst_n, .tick, .shift_en, .chain_clr, .load,
      .chain_in(sdata[b]), .chain_out(chain_out[b]),
      .cal_req, .cmp(cmp[b]), .ctrl(ctrl[b]), .cal_ctrl(cal_ctrl[b]), .cal_mode(cal_mode[b])
    );
  end

endmodule
