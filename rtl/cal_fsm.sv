// cal_fsm: two-step, multi-point calibration of the four channels of one
// stimulator, one channel after the other through the shared comparator.
//
// Step 1 (nmos offset): the channel's input is set to zero, only the nmos
// source is on, the high sense resistor RH is connected and the comparator
// reference is -35 mV. The nmos calibration code starts at 0 and rises by one
// each tick (each code removes 1 uA from Inmos) until the comparator reports
// Vout above Vref, i.e. the offset current has dropped below |Vref|/RH. That
// code is stored.
//
// Step 2 (pmos/nmos match): for each of the five calibration points (input
// codes 2, 5, 8, 11, 14, the middles of five input regions) both sources are
// on, the low resistor RL is connected and Vref is 0 V, so the comparator sees
// the sign of Idiff = Ipmos - Inmos. The pmos calibration code (offset binary,
// 16 = no correction) starts at 0, the most negative correction, and rises
// until Idiff turns positive; that code is stored for the region.
//
// A sweep that reaches code 31 without a switch stores 31. Interface: all
// state changes happen on `tick`; `cmp` is sampled at a tick for the code that
// was applied during the whole preceding tick period. `wr_n`/`wr_p` and `done`
// are tick-qualified strobes. A full calibration takes at most
// 4 x 6 x 32 + 1 ticks.
//
// The two steps, the resistors, the reference voltages, the 5-bit DACs and the
// five points follow the document; the linear upward sweep, the position of
// the points and the offset-binary pmos code are this design's own choices.
module cal_fsm
  import epi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              start,    // tick-qualified
  input  logic              cmp,      // 1 when the sensed Vout is above Vref
  output logic              busy,
  output logic              done,     // tick-qualified: last value stored
  output logic [1:0]        ch,       // channel under calibration
  output logic              step2,    // 0: step 1 (nmos offset), 1: step 2 (match)
  output logic [2:0]        point,    // step-2 calibration point
  output logic [CAL_W-1:0]  code,     // code being tried
  output logic              wr_n,     // store `code` as channel `ch`'s nmos code
  output logic              wr_p      // store `code` as channel `ch`'s pmos code for `point`
);

  logic found;

  assign found = busy && tick && (cmp || code == '1);
  assign wr_n  = found && !step2;
  assign wr_p  = found && step2;
  assign done  = wr_p && (point == 3'(N_CAL_PTS - 1)) && (ch == 2'(CH_PER_STIM - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ch    <= '0;
      step2 <= 1'b0;
      point <= '0;
      code  <= '0;
    end else if (tick) begin
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          ch    <= '0;
          step2 <= 1'b0;
          point <= '0;
          code  <= '0;
        end
      end else if (found) begin
        code <= '0;
        if (!step2) begin
          step2 <= 1'b1;
          point <= '0;
        end else if (point != 3'(N_CAL_PTS - 1)) begin
          point <= point + 1'b1;
        end else if (ch != 2'(CH_PER_STIM - 1)) begin
          ch    <= ch + 1'b1;
          step2 <= 1'b0;
          point <= '0;
        end else begin
          busy  <= 1'b0;
          step2 <= 1'b0;
          point <= '0;
          ch    <= '0;
        end
      end else begin
        code <= code + 1'b1;
      end
    end
  end

endmodule
