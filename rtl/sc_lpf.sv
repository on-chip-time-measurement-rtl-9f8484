// sc_lpf: behavioural model of the second-order switched-capacitor low-pass
// (biquad) filter of the homodyne TDC, cut-off 120 kHz.
//
// The filter is clocked at the switched-capacitor rate (clk, 10 ns period by
// default). Each period it takes the mean of its input over that period
// (the model integrates vin exactly between input events, standing in for
// the charge the sampling capacitors collect) and advances the two
// integrators of the biquad signal-flow graph:
//     bp += w0*Ts * (x - lp - bp/Q)
//     lp += w0*Ts * bp
// with w0 = 2*pi*FC_HZ. The output is the low-pass node, DC gain 1.
// Q = 0.707 (maximally flat) is this design's choice.
`timescale 1ps/1fs
module sc_lpf #(
  parameter real FC_HZ = 120.0e3,
  parameter real Q     = 0.707,
  parameter real TS_PS = 10000.0,
  parameter real VINIT = 0.0
) (
  input  logic clk,
  input  real  vin,
  output real  vout
);

  localparam real PI = 3.14159265358979;
  localparam real K  = 2.0 * PI * FC_HZ * TS_PS * 1.0e-12;

  real acc, last_v, last_t, t_per, lp, bp;

  initial begin
    acc    = 0.0;
    last_v = 0.0;
    last_t = 0.0;
    t_per  = 0.0;
    lp     = VINIT;
    bp     = 0.0;
  end

  // exact integral of the input between events
  always @(vin) begin
    acc    = acc + last_v * ($realtime - last_t);
    last_v = vin;
    last_t = $realtime;
  end

  initial forever begin
    @(posedge clk);
    begin
      automatic real x;
      acc   = acc + last_v * ($realtime - last_t);
      last_t = $realtime;
      x = ($realtime > t_per) ? acc / ($realtime - t_per) : last_v;
      t_per = $realtime;
      acc   = 0.0;
      bp    = bp + K * (x - lp - bp / Q);
      lp    = lp + K * bp;
    end
  end

  assign vout = lp;

endmodule
