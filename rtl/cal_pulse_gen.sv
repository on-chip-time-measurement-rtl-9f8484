// cal_pulse_gen: behavioural model of the on-chip calibration pulse generator.
//
// A rising edge on 'trigger' produces, DELAY_PS later, one high pulse of
// WIDTH_PS (1 ns in the design). Measuring it in pulse-width mode gives the
// calibration count (Ich/Idis * 1 ns / Tclk = 24 with the design's values).
// The generator's circuit is not described; the delay before the pulse is
// this design's choice.
`timescale 1ps/1fs
module cal_pulse_gen #(
  parameter real WIDTH_PS = 1000.0,
  parameter real DELAY_PS = 1000.0
) (
  input  logic trigger,
  output logic pulse
);

  logic p;
  initial p = 1'b0;

  initial forever begin
    @(posedge trigger);
    #(DELAY_PS) p = 1'b1;
    #(WIDTH_PS) p = 1'b0;
  end

  assign pulse = p;

endmodule
