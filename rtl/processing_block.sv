// processing_block: digital processing block of the PTMA.
//
// A second rail-to-rail comparator (same type as in the PIB, clocked by the
// comparator clock) watches the TVC capacitor voltage against a small
// threshold VTH. While the capacitor is above the threshold and the PIB pulse
// is no longer charging it, the counter counts the 2 GHz counter clock; when
// the capacitor is empty the comparator drops, the counter stops and the
// final count is latched into the N-bit output register.
//
// The design does not give the threshold; VTH = 1 mV is this design's
// choice. Gating the enable with the PIB pulse (count only the discharge) is
// also this design's reading of "enable the counter ... when the capacitor is
// discharging".
`timescale 1ps/1fs
module processing_block #(
  parameter int  N   = 8,
  parameter real VTH = 0.001
) (
  input  logic         clk_cmp,
  input  logic         clk_cnt,
  input  logic         start,
  input  real          vc,
  input  logic         pib_out_n,
  output logic         cmp_out,
  output logic [N-1:0] data,
  output logic         valid
);

  real vth_r;
  assign vth_r = VTH;

  rr_comparator u_cmp (
    .clk  (clk_cmp),
    .vinp (vc),
    .vinn (vth_r),
    .out  (cmp_out)
  );

  dp_counter #(.N(N)) u_cnt (
    .clk   (clk_cnt),
    .clr   (~start),
    .en    (cmp_out & pib_out_n),
    .data  (data),
    .valid (valid)
  );

endmodule
