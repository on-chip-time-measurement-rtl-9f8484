// nonoverlap_clkgen: two-phase non-overlapping clock generator for the
// switched-capacitor delta-sigma modulator and filter.
//
// Produces phi1 and phi2, which are never high together, and the delayed
// phases phi1d and phi2d, which rise with phi1/phi2 but fall one slot later
// (the delayed phases drive the input-side switches so that the
// signal-dependent charge injection of those switches comes after the
// bottom-plate switches have opened).
// The phases are decoded from a slot counter on a master clock running DIV
// times faster than the sampling clock. With DIV = 8 the period is
//   slot: 0   1   2   3   4   5   6   7
//   phi1:     1   1
//   phi1d:    1   1   1
//   phi2:                     1   1
//   phi2d:                    1   1   1
// Outputs are registered (glitch free). The slot positions are this design's
// choice; the design gives only the order of the edges.
`timescale 1ps/1fs
module nonoverlap_clkgen #(
  parameter int DIV = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic phi1,
  output logic phi1d,
  output logic phi2,
  output logic phi2d
);

  localparam int H = DIV / 2;

  logic [$clog2(DIV)-1:0] slot, nslot;

  assign nslot = (int'(slot) == DIV - 1) ? '0 : slot + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot  <= '0;
      phi1  <= 1'b0;
      phi1d <= 1'b0;
      phi2  <= 1'b0;
      phi2d <= 1'b0;
    end else begin
      slot  <= nslot;
      phi1  <= (int'(nslot) >= 1)     && (int'(nslot) <= H - 2);
      phi1d <= (int'(nslot) >= 1)     && (int'(nslot) <= H - 1);
      phi2  <= (int'(nslot) >= H + 1) && (int'(nslot) <= DIV - 2);
      phi2d <= (int'(nslot) >= H + 1) && (int'(nslot) <= DIV - 1);
    end
  end

  // phi1 and phi2 must never overlap
  assert property (@(posedge clk) disable iff (!rst_n) !(phi1 && phi2));
  assert property (@(posedge clk) disable iff (!rst_n) !(phi1d && phi2d));

endmodule
