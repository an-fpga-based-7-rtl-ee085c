// adc_pkg - shared default sizes of the carry-chain slope ADC.
//
// The ADC compares an on-chip reference slope with the analog input in an
// LVDS input buffer and measures, with four parallel tapped-delay-line TDCs,
// when the comparator output toggles. The constants below are the defaults
// used by every module; each module takes them as typed parameters so that
// testbenches can shrink the design.
//
// Values that follow the published design: four parallel delay chains, CARRY8 blocks
// of eight carry elements, dual sampling (CO and O output of each element),
// bubble-filter window k = 8, block latencies 2 / 13 / 7 / 4 cycles for delay
// chain / edge detector / bin-by-bin correction / voltage characteristic.
// Values chosen here: 60 CARRY8 blocks per chain (the published design only says the
// chain is longer than the 426 elements needed at 600 MHz), the widths of the
// corrected time and of the voltage code, and the calibration sample counts.
package adc_pkg;

  // Delay chain
  localparam int unsigned N_CHAINS  = 4;            // parallel delay chains
  localparam int unsigned N_CARRY8  = 60;           // CARRY8 blocks per chain
  localparam int unsigned N_ELEM    = 8 * N_CARRY8; // carry elements per chain
  localparam int unsigned N_TAPS    = 2 * N_ELEM;   // CO + O taps per chain

  // Bubble filter / edge detector
  localparam int unsigned BF_K      = 8;            // overlapping sum width k
  localparam int unsigned ED_LAT    = 13;           // edge detector latency

  // Widths
  localparam int unsigned POS_W     = $clog2(N_TAPS + 1); // tap position
  localparam int unsigned TIME_W    = 12;           // bin-corrected time code
  localparam int unsigned VOUT_W    = 10;           // voltage code

  // Latencies of the correction blocks (cycles)
  localparam int unsigned BIN_LAT   = 6;            // bin-by-bin look-up (7 with the 1-cycle chain mean)
  localparam int unsigned VLUT_LAT  = 3;            // voltage LUT (4 with final mean)

  // Calibration
  localparam int unsigned HIST_LOG2 = 16;           // hits per bin-by-bin histogram
  localparam int unsigned DLY_W     = 9;            // IDELAYE3 tap value width
  localparam int unsigned N_PHASES  = 112;          // MMCM phase steps per 360 deg

  // Calibration / run state of the ADC controller
  typedef enum logic [2:0] {
    CTL_IDLE,
    CTL_DC_LEN,   // delay chain length calibration
    CTL_ALIGN,    // alignment of comparator pulse in the chain
    CTL_BIN,      // bin-by-bin histogram and LUT build
    CTL_RUN       // measurement
  } ctl_state_e;

endpackage
