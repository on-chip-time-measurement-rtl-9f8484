// tvc: behavioural model of the current-steering time-to-voltage converter.
//
// The measurement pulse from the PIB is active low. While it is low the
// charging current ICH_UA flows into the integration capacitor C_PF; while it
// is high the smaller discharging current IDIS_UA is steered out of the
// capacitor until it reaches 0 V (dual-slope conversion). The current
// steering keeps both sources permanently on, so the ramps are modelled as
// ideal straight lines: dV = I * dt / C, evaluated every TSTEP_PS.
//
// With the design's currents (60 uA / 5 uA) the discharge takes
// ICH/IDIS = 12 times as long as the charge. The capacitor value is not
// given by the design; 1 pF keeps a 10 ns input below the 1.2 V rail.
// 'discharging' is high while the discharge current actually flows.
`timescale 1ps/1fs
module tvc #(
  parameter real ICH_UA   = 60.0,
  parameter real IDIS_UA  = 5.0,
  parameter real C_PF     = 1.0,
  parameter real VMAX     = 1.2,
  parameter int  TSTEP_PS = 5
) (
  input  logic vin_n,
  output real  vc,
  output logic discharging
);

  localparam real DV_CH  = ICH_UA  * 1.0e-6 * real'(TSTEP_PS) / C_PF;
  localparam real DV_DIS = IDIS_UA * 1.0e-6 * real'(TSTEP_PS) / C_PF;

  real  v;
  logic dis_q;

  initial begin
    v     = 0.0;
    dis_q = 1'b0;
  end

  always begin
    #(TSTEP_PS);
    if (!vin_n) begin
      v     = (v + DV_CH > VMAX) ? VMAX : v + DV_CH;
      dis_q = 1'b0;
    end else if (v > 0.0) begin
      v     = (v - DV_DIS < 0.0) ? 0.0 : v - DV_DIS;
      dis_q = 1'b1;
    end else begin
      dis_q = 1'b0;
    end
  end

  assign vc          = v;
  assign discharging = dis_q;

endmodule
