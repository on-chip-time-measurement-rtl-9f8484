// ref_generator: behavioural model of the reference voltage generator.
//
// A resistive divider from the 1.2 V supply gives 90 %, 50 % and 10 % of the
// supply (1.08 V, 0.6 V, 0.12 V). Three switches, closed by the programming
// bit int_ref_en, connect the taps to the VrefH/VrefM/VrefL pins; with the
// bit low the pins carry externally applied references instead. The pins are
// decoupled off chip, so the references are ideal sources in this model.
// The resistor ratio 0.1 : 0.4 : 0.4 : 0.1 (top to bottom) is this design's
// choice; the design gives only the tap voltages.
`timescale 1ps/1fs
module ref_generator #(
  parameter real VDD = 1.2
) (
  input  logic int_ref_en,
  input  real  ext_h,
  input  real  ext_m,
  input  real  ext_l,
  output real  vref_h,
  output real  vref_m,
  output real  vref_l
);

  localparam real R1 = 0.1, R2 = 0.4, R3 = 0.4, R4 = 0.1;  // top to bottom
  localparam real RT = R1 + R2 + R3 + R4;

  assign vref_h = int_ref_en ? VDD * (R2 + R3 + R4) / RT : ext_h;
  assign vref_m = int_ref_en ? VDD * (R3 + R4) / RT      : ext_m;
  assign vref_l = int_ref_en ? VDD * R4 / RT             : ext_l;

endmodule
