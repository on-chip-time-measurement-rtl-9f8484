// ptma_core: the programmable time measurement core.
//
// Chain: programmable interface block (PIB) -> time-to-voltage converter
// (TVC) -> digital processing block, plus the two ring-oscillator clocks
// (2.5 GHz comparator clock, 2 GHz counter clock) and the 1 ns calibration
// pulse generator.
//
// Operation: with pwrup high the clocks run. mode selects rise time, fall
// time, pulse width or propagation delay. When start goes high the PIB
// produces one active-low pulse as long as the selected interval; the TVC
// charges its capacitor during the pulse with Ich and discharges it with
// Idis afterwards; the processing block counts counter-clock periods during
// the discharge and latches the result:
//     interval = (Idis / Ich) * data * Tclk = data * 41.67 ps (defaults).
// Releasing start clears the result flag and re-arms the PIB.
// With cal_en high, Vin1 is replaced by the on-chip 1 ns pulse (full swing),
// triggered by start; measured in pulse-width mode it gives about 24.
`timescale 1ps/1fs
module ptma_core
  import ptma_pkg::*;
#(
  parameter int N = 8
) (
  input  meas_mode_e   mode,
  input  logic         pwrup,
  input  logic         start,
  input  logic         cal_en,
  input  real          vin1,
  input  real          vin2,
  input  real          vref_h,
  input  real          vref_m,
  input  real          vref_l,
  output logic [N-1:0] data,
  output logic         valid,
  // observation
  output logic         pib_out_n,
  output sw_bus_t      sw,
  output logic         comp,
  output logic         pib_done,
  output logic         dp_cmp,
  output real          vc,
  output logic         tvc_dis
);

  logic clk_cmp, clk_cnt;
  logic cal_pulse;
  real  vin1_sel;

  clock_generator #(.STAGES(7), .TAU_PS(14.2857)) u_clk_cmp (
    .clk_enable (pwrup),
    .clk_out    (clk_cmp)
  );

  clock_generator #(.STAGES(7), .TAU_PS(17.85)) u_clk_cnt (
    .clk_enable (pwrup),
    .clk_out    (clk_cnt)
  );

  cal_pulse_gen u_cal (
    .trigger (start & cal_en),
    .pulse   (cal_pulse)
  );

  assign vin1_sel = cal_en ? (cal_pulse ? VDD : 0.0) : vin1;

  pib u_pib (
    .clk_cmp   (clk_cmp),
    .mode      (mode),
    .pwrup     (pwrup),
    .start     (start),
    .vin1      (vin1_sel),
    .vin2      (vin2),
    .vref_h    (vref_h),
    .vref_m    (vref_m),
    .vref_l    (vref_l),
    .pib_out_n (pib_out_n),
    .sw        (sw),
    .comp      (comp),
    .done      (pib_done),
    .sc        ()
  );

  tvc u_tvc (
    .vin_n       (pib_out_n),
    .vc          (vc),
    .discharging (tvc_dis)
  );

  processing_block #(.N(N)) u_dp (
    .clk_cmp   (clk_cmp),
    .clk_cnt   (clk_cnt),
    .start     (start),
    .vc        (vc),
    .pib_out_n (pib_out_n),
    .cmp_out   (dp_cmp),
    .data      (data),
    .valid     (valid)
  );

endmodule
