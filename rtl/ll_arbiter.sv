// ll_arbiter: global mode control of one stimulator's local logic.
//
// After reset the stimulator calibrates before it stimulates: the arbiter
// starts the calibration state machine at the first tick, keeps the channel
// machines in their rest state while calibration runs, and hands control to
// stimulation when calibration reports done. A `cal_req` seen at a tick
// during stimulation starts a new calibration. All moves happen on `tick`;
// `cal_start` is a one-tick strobe (already qualified by `tick`).
//
// Calibrating once at power-up follows the document; the re-calibration
// request input is this design's own addition.
module ll_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic cal_req,
  input  logic cal_done,   // tick-qualified strobe from the calibration FSM
  output logic cal_start,  // tick-qualified strobe to the calibration FSM
  output logic cal_mode    // calibration owns the drivers
);

  typedef enum logic [1:0] {AR_START, AR_CAL, AR_STIM} ar_state_t;
  ar_state_t state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= AR_START;
    else if (tick) begin
      unique case (state_q)
        AR_START: state_q <= AR_CAL;
        AR_CAL:   if (cal_done) state_q <= AR_STIM;
        AR_STIM:  if (cal_req)  state_q <= AR_START;
        default:  state_q <= AR_START;
      endcase
    end
  end

  assign cal_start = tick && (state_q == AR_START);
  assign cal_mode  = (state_q != AR_STIM);

endmodule
