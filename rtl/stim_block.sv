// stim_block: one block of the stimulator array, N_COLS four-channel
// stimulators cascaded into a single scan chain (16 x 16 = 256 bits by
// default).
//
// The chain enters at the stimulator of the highest column (c15) and leaves at
// column c0, so the first 16 bits shifted in during a frame end up in c0. All
// stimulators share the chain strobes (shift, clear, load) and the local
// tick. Each stimulator's analog controls and comparator input are brought
// out indexed by column. The block size and chain order follow the document;
// the `chain_out` port (end of the chain) is this design's own addition for
// observing the chain.
module stim_block
  import epi_pkg::*;
#(
  parameter int unsigned N_COLS = 16
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  logic                                       tick,
  input  logic                                       shift_en,
  input  logic                                       chain_clr,
  input  logic                                       load,
  input  logic                                       chain_in,
  output logic                                       chain_out,
  input  logic                                       cal_req,
  input  logic      [N_COLS-1:0]                     cmp,
  output chan_ctrl_t [N_COLS-1:0][CH_PER_STIM-1:0]   ctrl,
  output cal_ctrl_t [N_COLS-1:0]                     cal_ctrl,
  output logic      [N_COLS-1:0]                     cal_mode
);

  // link[k] is the serial input of column k; link[N_COLS] is the chain input.
  logic [N_COLS:0] link;
  assign link[N_COLS] = chain_in;
  assign chain_out    = link[0];

  for (genvar k = 0; k < N_COLS; k++) begin : g_col
    local_logic u_ll (
      .clk, .rst_n, .tick, .shift_en, .chain_clr, .load,
      .sdi(link[k+1]), .sdo(link[k]),
      .cal_req, .cmp(cmp[k]), .ctrl(ctrl[k]), .cal_ctrl(cal_ctrl[k]), .cal_mode(cal_mode[k])
    );
  end

endmodule
