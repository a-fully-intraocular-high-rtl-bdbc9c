// scan_reg: serial interface of one 4-channel stimulator.
//
// Each stimulator holds one 16-bit stage of its block's scan chain (4 bits for
// each of its 4 channels). The stage shifts on the 20 MHz clock while
// `shift_en` is high, taking `sdi` into bit 0 and passing bit 15 on to the next
// stimulator through `sdo`, so stimulators cascade with no other wiring. On
// `load` the stage is copied into the input register that the channel state
// machines read at their next tick; `clr` empties the stage (used when a frame
// is discarded, so that the following load hands every channel a zero).
// Channel c takes bits [4c+3:4c] of the stage.
//
// The 16-bit stage per stimulator, the cascade and the clear-on-error follow
// the document; the separate input register and the bit layout are this
// design's own choices. Timing: `sdo` and `din` change on the clock edge
// after the enabling strobe.
module scan_reg
  import epi_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               shift_en,
  input  logic                               clr,
  input  logic                               load,
  input  logic                               sdi,
  output logic                               sdo,
  output logic [CH_PER_STIM-1:0][DIN_W-1:0]  din
);

  logic [WORD_W-1:0] stage_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         stage_q <= '0;
    else if (clr)       stage_q <= '0;
    else if (shift_en)  stage_q <= {stage_q[WORD_W-2:0], sdi};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    din <= '0;
    else if (load) din <= stage_q;
  end

  assign sdo = stage_q[WORD_W-1];

endmodule
