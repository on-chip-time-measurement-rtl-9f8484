// pib_switches: behavioural model of the seven analogue input switches of the
// programmable interface block (transmission gates in silicon).
//
// Each switch connects one analogue source to one comparator input node. The
// node map is this design's reading of the switch-controller truth table
// (ptma_pkg SW_* constants):
//   vinp <- Vin1 (sw0), VrefH (sw2), VrefM (sw5)
//   vinn <- Vin1 (sw1), VrefL (sw3), Vin2  (sw4), VrefM (sw6)
// Switches are ideal. When several switches drive one node the lowest index
// wins (the controller never closes two on one node); a node with no closed
// switch keeps its last voltage, as a floating comparator input would.
// The model re-evaluates every TSTEP_PS picoseconds.
`timescale 1ps/1fs
module pib_switches
  import ptma_pkg::*;
#(
  parameter int TSTEP_PS = 5
) (
  input  sw_bus_t sw,
  input  real     vin1,
  input  real     vin2,
  input  real     vref_h,
  input  real     vref_m,
  input  real     vref_l,
  output real     vinp,
  output real     vinn
);

  real p_q;
  real n_q;

  initial begin
    p_q = 0.0;
    n_q = 0.0;
  end

  always begin
    #(TSTEP_PS);
    if      (sw[SW_VIN1_P])  p_q = vin1;
    else if (sw[SW_VREFH_P]) p_q = vref_h;
    else if (sw[SW_VREFM_P]) p_q = vref_m;
    if      (sw[SW_VIN1_N])  n_q = vin1;
    else if (sw[SW_VREFL_N]) n_q = vref_l;
    else if (sw[SW_VIN2_N])  n_q = vin2;
    else if (sw[SW_VREFM_N]) n_q = vref_m;
  end

  assign vinp = p_q;
  assign vinn = n_q;

endmodule
