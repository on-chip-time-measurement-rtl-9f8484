// ds_modulator: behavioural model of the first-order switched-capacitor
// delta-sigma modulator.
//
// Structure: the input is sampled onto C on phi1 (phi1d) and transferred
// into the integrator (feedback capacitor C) on phi2, together with the
// feedback reference chosen by a D flip-flop: VREFP when its Q is high,
// VREFM when low. A comparator against the common mode drives the flip-flop,
// which is clocked by phi2. With equal capacitors one cycle adds
//     u += (vin - VCM) - (vfb - VCM)
// to the integrator, so the density of ones converges to
//     (vin - VREFM) / (VREFP - VREFM).
// The integrator is written non-inverting; the sign of the real stage is
// absorbed in the comparator polarity. VREFP/VREFM = 1.2 V / 0 V are this
// design's choice.
`timescale 1ps/1fs
module ds_modulator #(
  parameter real VREFP = 1.2,
  parameter real VREFM = 0.0,
  parameter real VCM   = 0.6
) (
  input  logic phi1,
  input  logic phi2,
  input  logic rst_n,
  input  real  vin,
  output logic bit_out,
  output real  v_int
);

  real  vs, u;
  logic q;

  initial begin
    vs = VCM;
    u  = 0.0;
    q  = 1'b0;
  end

  initial forever begin
    @(posedge phi1);
    vs = vin;
  end

  initial forever begin
    @(posedge phi2);
    if (!rst_n) begin
      u = 0.0;
      q = 1'b0;
    end else begin
      automatic real  vfb = q ? VREFP : VREFM;
      automatic logic c   = (u > 0.0);
      u = u + (vs - VCM) - (vfb - VCM);
      q = c;
    end
  end

  assign bit_out = q;
  assign v_int   = u + VCM;

endmodule
