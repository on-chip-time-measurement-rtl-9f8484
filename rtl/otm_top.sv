// otm_top: the two on-chip time measurement architectures side by side.
//
//  * ptma_chip - programmable time measurement architecture: one core that
//    measures rise time, fall time, pulse width or propagation delay of
//    analogue input waveforms (dual-slope time-to-voltage conversion,
//    about 42 ps per count with the default currents and clock).
//  * htdc - homodyne time-to-digital converter: phase difference between two
//    equal-frequency clocks -> mixer -> low-pass -> delta-sigma ADC.
// The two share nothing; each has its own ports (htdc_* for the second).
`timescale 1ps/1fs
module otm_top
  import ptma_pkg::*;
#(
  parameter int N        = 8,
  parameter int OSR      = 32,
  parameter int HTDC_W   = 8
) (
  // PTMA
  input  logic              io_en,
  input  logic              int_ref_en,
  input  logic [1:0]        mode,
  input  logic              pwrup,
  input  logic              start,
  input  logic              cal_en,
  input  real               vin1,
  input  real               vin2,
  input  real               ext_vref_h,
  input  real               ext_vref_m,
  input  real               ext_vref_l,
  output logic [N-1:0]      data,
  output logic              valid,
  output logic              data_oe,
  // HTDC
  input  logic              htdc_clk_master,
  input  logic              htdc_rst_n,
  input  logic              htdc_clk_in,
  input  logic              htdc_clk_ref,
  output logic [HTDC_W-1:0] htdc_count,
  output logic              htdc_strobe,
  output logic              htdc_bitstream,
  output real               htdc_v_dc
);

  ptma_chip #(.N(N)) u_ptma (
    .io_en      (io_en),
    .int_ref_en (int_ref_en),
    .mode       (mode),
    .pwrup      (pwrup),
    .start      (start),
    .cal_en     (cal_en),
    .vin1       (vin1),
    .vin2       (vin2),
    .ext_vref_h (ext_vref_h),
    .ext_vref_m (ext_vref_m),
    .ext_vref_l (ext_vref_l),
    .data       (data),
    .valid      (valid),
    .data_oe    (data_oe)
  );

  htdc #(.OSR(OSR), .W(HTDC_W)) u_htdc (
    .clk_master (htdc_clk_master),
    .rst_n      (htdc_rst_n),
    .clk_in     (htdc_clk_in),
    .clk_ref    (htdc_clk_ref),
    .count      (htdc_count),
    .strobe     (htdc_strobe),
    .bitstream  (htdc_bitstream),
    .v_dc       (htdc_v_dc)
  );

endmodule
