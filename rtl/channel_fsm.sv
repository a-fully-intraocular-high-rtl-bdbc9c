// channel_fsm: stimulation state machine of one channel.
//
// The channel receives a 4-bit amplitude every time step (one `tick`). The
// waveform is coded in the sequence itself: the first group of non-zero
// values is the first (anodic) phase, the zeros that follow are the
// interphase delay, the next non-zero group is the second (cathodic) phase,
// and the zeros after it are the discharge phase, during which the electrode
// is shorted to ground until the next pulse starts. Any amplitude pattern
// inside a phase is passed to the current DAC, which gives arbitrary
// waveforms.
//
// At each tick the machine takes `din`, moves to its next state and registers
// the amplitude, so the driver shows step k's value during step k+1 (one tick
// of latency). `hold` (calibration in progress) forces the rest state and
// zero amplitude. The phase coding follows the document; anodic-first
// polarity is as in its waveform figure; the one-tick latency is this
// design's own choice.
module channel_fsm
  import epi_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic             hold,
  input  logic [DIN_W-1:0] din,
  output chan_state_t      state,
  output logic [DIN_W-1:0] amp
);

  chan_state_t state_d;
  logic        nz;

  assign nz = (din != '0);

  always_comb begin
    state_d = state;
    unique case (state)
      CH_REST:   if (nz)  state_d = CH_PHASE1;
      CH_PHASE1: if (!nz) state_d = CH_INTER;
      CH_INTER:  if (nz)  state_d = CH_PHASE2;
      CH_PHASE2: if (!nz) state_d = CH_REST;
      default:            state_d = CH_REST;
    endcase
    if (hold) state_d = CH_REST;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CH_REST;
      amp   <= '0;
    end else if (tick) begin
      state <= state_d;
      amp   <= hold ? '0 : din;
    end
  end

endmodule
