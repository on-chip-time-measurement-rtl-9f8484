// htdc: homodyne time-to-digital converter.
//
// Converts a small phase (time) difference between two clocks of equal
// frequency into a number: mixer -> low-pass filter -> delta-sigma ADC
// (first-order modulator plus sinc decimation filter).
// The mixer product of clk_in and clk_ref has a DC part that depends on
// their phase difference; the 120 kHz low-pass keeps it (v_dc); the
// modulator turns v_dc into a one-bit stream at the sampling rate, and the
// decimation filter counts the ones in every OSR (32) samples.
// Clocking: clk_master runs at 8x the sampling rate; the non-overlapping
// clock generator derives phi1/phi2 (10 ns sampling period at an 800 MHz
// master clock). count is updated every OSR sampling periods, with strobe.
`timescale 1ps/1fs
module htdc #(
  parameter int OSR = 32,
  parameter int W   = 8
) (
  input  logic         clk_master,
  input  logic         rst_n,
  input  logic         clk_in,
  input  logic         clk_ref,
  output logic [W-1:0] count,
  output logic         strobe,
  output logic         bitstream,
  output real          v_dc
);

  real  vm, v_int;
  logic phi1, phi1d, phi2, phi2d;

  htdc_mixer u_mix (
    .clk_in  (clk_in),
    .clk_ref (clk_ref),
    .vm      (vm)
  );

  nonoverlap_clkgen u_clk (
    .clk   (clk_master),
    .rst_n (rst_n),
    .phi1  (phi1),
    .phi1d (phi1d),
    .phi2  (phi2),
    .phi2d (phi2d)
  );

  sc_lpf #(.VINIT(0.6)) u_lpf (
    .clk  (phi1),
    .vin  (vm),
    .vout (v_dc)
  );

  ds_modulator u_mod (
    .phi1    (phi1d),
    .phi2    (phi2),
    .rst_n   (rst_n),
    .vin     (v_dc),
    .bit_out (bitstream),
    .v_int   (v_int)
  );

  decimation_filter #(.OSR(OSR), .W(W)) u_dec (
    .clk    (phi2d),
    .rst_n  (rst_n),
    .bit_in (bitstream),
    .count  (count),
    .strobe (strobe)
  );

endmodule
