// htdc_mixer: behavioural model of the dual-gate mixer of the homodyne TDC.
//
// The mixer multiplies the input clock by the reference clock of the same
// frequency (homodyne). For two sinusoids the product holds a DC term
// A^2/2 * cos(phi1 - phi2) plus a term at twice the clock frequency, which
// the following low-pass filter removes. The clocks here are square waves of
// amplitude +/-A around the common mode VCM, so the instantaneous product is
// +A^2 while both clocks agree and -A^2 while they differ; its average falls
// linearly with the phase difference (A^2 at zero, -A^2 at half a period).
// Output: vm = VCM + GAIN * product. Amplitude and gain are this design's
// choices.
`timescale 1ps/1fs
module htdc_mixer #(
  parameter real A    = 0.6,
  parameter real GAIN = 1.0,
  parameter real VCM  = 0.6
) (
  input  logic clk_in,
  input  logic clk_ref,
  output real  vm
);

  assign vm = (clk_in == clk_ref) ? VCM + GAIN * A * A : VCM - GAIN * A * A;

endmodule
