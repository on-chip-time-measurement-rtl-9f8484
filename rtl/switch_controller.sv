// switch_controller: decodes the measurement mode and the PIB comparator
// output into the seven switch enables of the programmable interface block.
//
// Purely combinational. For each mode the switch bus has one value while the
// comparator output is low (first comparison) and, for rise time, fall time
// and propagation delay, a second value once the comparator has gone high
// (second comparison against the other reference or the other input). In
// pulse-width mode the same input/reference pair is kept throughout. The codes
// are those of the design's truth table:
//
//   mode  comp=0    comp=1
//   00    0001001   0000110   rise time   (Vin1 vs VrefL, then VrefH)
//   01    0000110   0001001   fall time   (Vin1 vs VrefH, then VrefL)
//   10    1000001   1000001   pulse width (Vin1 vs VrefM)
//   11    1000001   0110000   propagation (Vin1 vs VrefM, then Vin2 vs VrefM)
//
// Interface: mode {mode1,mode0}, comp_in, sw[6:0] (1 = closed). No clock.
`timescale 1ps/1fs
module switch_controller
  import ptma_pkg::*;
(
  input  meas_mode_e mode,
  input  logic       comp_in,
  output sw_bus_t    sw
);

  sw_bus_t first_cmp, second_cmp;

  always_comb begin
    first_cmp  = '0;
    second_cmp = '0;
    unique case (mode)
      MODE_RISE: begin
        first_cmp [SW_VIN1_P]  = 1'b1;  first_cmp [SW_VREFL_N] = 1'b1;
        second_cmp[SW_VIN1_N]  = 1'b1;  second_cmp[SW_VREFH_P] = 1'b1;
      end
      MODE_FALL: begin
        first_cmp [SW_VIN1_N]  = 1'b1;  first_cmp [SW_VREFH_P] = 1'b1;
        second_cmp[SW_VIN1_P]  = 1'b1;  second_cmp[SW_VREFL_N] = 1'b1;
      end
      MODE_PULSE: begin
        first_cmp [SW_VIN1_P]  = 1'b1;  first_cmp [SW_VREFM_N] = 1'b1;
        second_cmp             = first_cmp;
      end
      MODE_PROP: begin
        first_cmp [SW_VIN1_P]  = 1'b1;  first_cmp [SW_VREFM_N] = 1'b1;
        second_cmp[SW_VIN2_N]  = 1'b1;  second_cmp[SW_VREFM_P] = 1'b1;
      end
      default: ;
    endcase
    sw = comp_in ? second_cmp : first_cmp;
  end

endmodule
