// rr_comparator: behavioural model of the clocked rail-to-rail comparator
// (preamplifier with complementary input pairs, cross-coupled decision latch,
// SR output latch).
//
// On each rising edge of clk the differential input is sampled; the SR latch
// presents the decision T_PD_PS picoseconds later and holds it until the next
// rising edge. T_PD_PS defaults to the typical-corner propagation delay of the
// design (175.65 ps at 1.2 V, 25 C). Inputs are rail to rail; there is no
// offset or noise in the model.
`timescale 1ps/1fs
module rr_comparator #(
  parameter real T_PD_PS = 175.65
) (
  input  logic clk,
  input  real  vinp,
  input  real  vinn,
  output logic out
);

  logic q;

  initial q = 1'b0;

  always @(posedge clk) begin
    automatic logic d = (vinp > vinn);
    q <= #(T_PD_PS) d;
  end

  assign out = q;

endmodule
