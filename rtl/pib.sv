// pib: programmable interface block of the PTMA.
//
// Seven analogue switches put one input and one reference (or the two
// inputs) onto the rail-to-rail comparator. The switch controller chooses the
// pair from the mode pins and the comparator's own output, so the comparator
// goes high at the first threshold crossing and low at the second one:
//   rise time   Vin1 crosses VrefL (10 %) ... Vin1 crosses VrefH (90 %)
//   fall time   Vin1 crosses VrefH ...        Vin1 crosses VrefL
//   pulse width Vin1 above VrefM (50 %)
//   propagation Vin1 crosses VrefM ...        Vin2 crosses VrefM
// The comparator control logic passes only that first pulse, inverted, to
// the TVC (pib_out_n low = charge). Edges are quantised to the comparator
// clock and delayed by the comparator's propagation delay.
// The switch controller receives the comparator output only while pwrup and
// start are high (this design's choice: without it a comparator left high by
// the previous measurement can hold the second-comparison switch setting).
`timescale 1ps/1fs
module pib
  import ptma_pkg::*;
(
  input  logic       clk_cmp,
  input  meas_mode_e mode,
  input  logic       pwrup,
  input  logic       start,
  input  real        vin1,
  input  real        vin2,
  input  real        vref_h,
  input  real        vref_m,
  input  real        vref_l,
  output logic       pib_out_n,
  output sw_bus_t    sw,
  output logic       comp,
  output logic       done,
  output logic [2:1] sc
);

  real         vinp, vinn;
  logic        comp_armed;

  // The switch controller sees the comparator only while a measurement is
  // armed; otherwise it holds the first-comparison setting, so the
  // comparator settles to the idle level before start is raised.
  assign comp_armed = comp & pwrup & start;

  switch_controller u_ctl (
    .mode    (mode),
    .comp_in (comp_armed),
    .sw      (sw)
  );

  pib_switches u_sw (
    .sw     (sw),
    .vin1   (vin1),
    .vin2   (vin2),
    .vref_h (vref_h),
    .vref_m (vref_m),
    .vref_l (vref_l),
    .vinp   (vinp),
    .vinn   (vinn)
  );

  rr_comparator u_cmp (
    .clk  (clk_cmp),
    .vinp (vinp),
    .vinn (vinn),
    .out  (comp)
  );

  comparator_control u_cc (
    .clk_cmp   (clk_cmp),
    .pwrup     (pwrup),
    .start     (start),
    .comp      (comp),
    .sc        (sc),
    .pib_out_n (pib_out_n),
    .done      (done)
  );

endmodule
