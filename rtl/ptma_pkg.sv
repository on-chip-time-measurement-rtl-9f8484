// ptma_pkg: types and constants shared by the programmable time measurement
// architecture (PTMA).
//
// The PTMA is programmed by two mode pins. The binary mode encoding and the
// switch indices follow the mode table and switch-controller truth table of
// the design; which analogue node each switch connects is this design's own
// reading of that truth table (see pib_switches).
`timescale 1ps/1fs
package ptma_pkg;

  // Measurement mode, {mode1, mode0}
  typedef enum logic [1:0] {
    MODE_RISE  = 2'b00,
    MODE_FALL  = 2'b01,
    MODE_PULSE = 2'b10,
    MODE_PROP  = 2'b11
  } meas_mode_e;

  // Switch enables sw<6:0>: 1 = switch closed
  typedef logic [6:0] sw_bus_t;

  // Switch to node map (this design's reading of the truth table)
  localparam int SW_VIN1_P  = 0;  // Vin1  -> comparator +
  localparam int SW_VIN1_N  = 1;  // Vin1  -> comparator -
  localparam int SW_VREFH_P = 2;  // VrefH -> comparator +
  localparam int SW_VREFL_N = 3;  // VrefL -> comparator -
  localparam int SW_VIN2_N  = 4;  // Vin2  -> comparator -
  localparam int SW_VREFM_P = 5;  // VrefM -> comparator +
  localparam int SW_VREFM_N = 6;  // VrefM -> comparator -

  // Reference voltages: 90 %, 50 % and 10 % of the 1.2 V supply
  localparam real VDD   = 1.2;
  localparam real VREFH = 1.08;
  localparam real VREFM = 0.6;
  localparam real VREFL = 0.12;

endpackage
