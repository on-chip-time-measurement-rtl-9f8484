// ptma_chip: the PTMA prototype as placed on the die.
//
// The time measurement core, the reference generator (on-chip resistive
// divider or external VrefH/VrefM/VrefL pins, chosen by int_ref_en) and the
// enable-controlled buffers on every digital input and output. io_en is the
// programming bit that enables the buffers; while it is low the core sees
// all its digital inputs low (powered down, clocks stopped) and the outputs
// are not driven (data_oe low).
`timescale 1ps/1fs
module ptma_chip
  import ptma_pkg::*;
#(
  parameter int N = 8
) (
  input  logic         io_en,
  input  logic         int_ref_en,
  input  logic [1:0]   mode,
  input  logic         pwrup,
  input  logic         start,
  input  logic         cal_en,
  input  real          vin1,
  input  real          vin2,
  input  real          ext_vref_h,
  input  real          ext_vref_m,
  input  real          ext_vref_l,
  output logic [N-1:0] data,
  output logic         valid,
  output logic         data_oe
);

  logic [4:0]   in_core;
  logic [N:0]   out_core;
  real          vref_h, vref_m, vref_l;
  meas_mode_e   mode_core;

  io_gate #(.W(5)) u_in_buf (
    .en (io_en),
    .a  ({mode, pwrup, start, cal_en}),
    .y  (in_core),
    .oe ()
  );

  assign mode_core = meas_mode_e'(in_core[4:3]);

  ref_generator u_ref (
    .int_ref_en (int_ref_en),
    .ext_h      (ext_vref_h),
    .ext_m      (ext_vref_m),
    .ext_l      (ext_vref_l),
    .vref_h     (vref_h),
    .vref_m     (vref_m),
    .vref_l     (vref_l)
  );

  logic [N-1:0] core_data;
  logic         core_valid;

  ptma_core #(.N(N)) u_core (
    .mode      (mode_core),
    .pwrup     (in_core[2]),
    .start     (in_core[1]),
    .cal_en    (in_core[0]),
    .vin1      (vin1),
    .vin2      (vin2),
    .vref_h    (vref_h),
    .vref_m    (vref_m),
    .vref_l    (vref_l),
    .data      (core_data),
    .valid     (core_valid),
    .pib_out_n (),
    .sw        (),
    .comp      (),
    .pib_done  (),
    .dp_cmp    (),
    .vc        (),
    .tvc_dis   ()
  );

  io_gate #(.W(N+1)) u_out_buf (
    .en (io_en),
    .a  ({core_valid, core_data}),
    .y  (out_core),
    .oe (data_oe)
  );

  assign valid = out_core[N];
  assign data  = out_core[N-1:0];

endmodule
