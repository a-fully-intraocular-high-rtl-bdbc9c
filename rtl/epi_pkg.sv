// epi_pkg: types and constants shared by the digital part of the 512-channel
// epiretinal stimulator.
//
// The stimulator array is 8 blocks x 16 four-channel stimulators. Each channel
// takes a 4-bit amplitude per time step and each stimulator carries 4 x 4 = 16
// scan-chain bits, so a block's chain is 256 bits long. Calibration uses two
// 5-bit current DACs per channel (one trimming the cathodic nmos source, one the
// anodic pmos source) and five calibration points for the pmos trim. These
// numbers follow the document; the header value, the CRC polynomial, the
// calibration points and the field layout of the control structs are this
// design's own choices.
package epi_pkg;

  localparam int unsigned DIN_W       = 4;   // amplitude bits per channel
  localparam int unsigned CH_PER_STIM = 4;   // channels sharing one local logic
  localparam int unsigned WORD_W      = DIN_W * CH_PER_STIM; // 16 scan bits per stimulator
  localparam int unsigned CAL_W       = 5;   // calibration DAC resolution
  localparam int unsigned N_CAL_PTS   = 5;   // multi-point calibration of the pmos source
  localparam int unsigned HDR_W       = 8;   // frame header length
  localparam int unsigned CRC_W       = 8;   // CRC8 after each column word

  // Frame header (sync word) and CRC8 generator x^8 + x^2 + x + 1.
  localparam logic [HDR_W-1:0] HEADER   = 8'hA5;
  localparam logic [CRC_W-1:0] CRC_POLY = 8'h07;

  // Mid-scale code of the pmos calibration DAC: no correction.
  localparam logic [CAL_W-1:0] CALP_ZERO = 5'd16;

  // Stimulation state of one channel (Fig. 17 sequence).
  typedef enum logic [1:0] {
    CH_REST   = 2'd0,  // zeros before the first phase or after the second: electrode shorted
    CH_PHASE1 = 2'd1,  // first non-zero group: anodic (pmos) current
    CH_INTER  = 2'd2,  // zeros between phases: driver disconnected
    CH_PHASE2 = 2'd3   // second non-zero group: cathodic (nmos) current
  } chan_state_t;

  // Controls from the local logic to one analog current driver.
  typedef struct packed {
    logic [DIN_W-1:0] din;        // 4-bit input current DAC code
    logic             pmos_on;    // anodic current source enabled
    logic             nmos_on;    // cathodic current source enabled
    logic [CAL_W-1:0] caln;       // nmos calibration DAC code (subtracts from Inmos)
    logic [CAL_W-1:0] calp;       // pmos calibration DAC code (offset binary, 16 = none)
    logic             sw_elec;    // HV switch driver -> electrode closed
    logic             sw_short;   // electrode shorted to ground
    logic             sw_cal;     // driver connected to the shared calibration circuit
    logic             hv_hi_swing;// HV switch in high-swing bias (stimulation phases)
    logic             vg_anodic;  // output-stage gate bias for the anodic phase (else cathodic)
    logic             prot_clr;   // remove charge from the protection transistors
  } chan_ctrl_t;

  // Controls from the local logic to the shared calibration circuit.
  typedef struct packed {
    logic rh_en;      // high sense resistor RH connected (step 1)
    logic rl_en;      // low sense resistor RL connected (step 2)
    logic vref_zero;  // Vref = 0 V (step 2), else Vref = -35 mV (step 1)
  } cal_ctrl_t;

  // Region of the 4-bit input range whose pmos calibration code applies.
  // Codes 1..15 are split into five regions of three codes each.
  function automatic logic [2:0] cal_region(input logic [DIN_W-1:0] din);
    logic [DIN_W-1:0] d;
    d = (din == '0) ? '0 : din - 1'b1;
    return 3'(d / 3);
  endfunction

  // Input code at which region r is calibrated: the middle of the region.
  function automatic logic [DIN_W-1:0] point_din(input logic [2:0] r);
    return DIN_W'(3 * r + 2);
  endfunction

  // One serial CRC8 step, data taken MSB first.
  function automatic logic [CRC_W-1:0] crc8_step(input logic [CRC_W-1:0] crc, input logic bit_in);
    logic fb;
    fb = crc[CRC_W-1] ^ bit_in;
    return {crc[CRC_W-2:0], 1'b0} ^ (fb ? CRC_POLY : '0);
  endfunction

endpackage
