// clock_generator: behavioural model of the on-chip high-speed clock source.
//
// A ring oscillator made of a NAND gate (second input clk_enable) and
// STAGES-1 inverters, every stage with delay TAU_PS, oscillates at
// f = 1 / (2 * STAGES * TAU_PS) while clk_enable is high. One tap of the
// ring, buffered by an inverter, clocks a toggle flip-flop (D from Q_bar)
// that halves the frequency and squares the duty cycle; two inverters buffer
// the flip-flop output to clk_out.
//
// Defaults: 7 stages of 17.85 ps give a 4 GHz ring and a 2 GHz clk_out (the
// counter clock). TAU_PS = 14.2857 gives the 2.5 GHz comparator clock; that
// second setting is this design's choice. With clk_enable low the ring
// stops with the NAND output high.
`timescale 1ps/1fs
module clock_generator #(
  parameter int  STAGES = 7,
  parameter real TAU_PS = 17.85
) (
  input  logic clk_enable,
  output logic clk_out
);

  logic ring [STAGES];
  logic tap_n;
  logic q;

  assign #(TAU_PS) ring[0] = ~(clk_enable & ring[STAGES-1]);
  for (genvar i = 1; i < STAGES; i++) begin : g_inv
    assign #(TAU_PS) ring[i] = ~ring[i-1];
  end

  assign tap_n = ~ring[2];

  initial q = 1'b0;
  always @(posedge tap_n) q <= ~q;

  assign clk_out = q;

endmodule
