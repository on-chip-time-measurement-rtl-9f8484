// io_gate: the enable-controlled I/O buffers around the PTMA.
//
// Every digital input and output of the measurement core passes a buffer
// whose enable is a programming bit, so the core is isolated from the rest of
// the die until it is enabled. In silicon the disabled buffer is high
// impedance; a two-state model cannot show that, so a disabled buffer drives
// zeros and 'oe' reports that the pad is not driven.
// Interface: W-bit data a -> y, enable en. Combinational.
`timescale 1ps/1fs
module io_gate #(
  parameter int W = 8
) (
  input  logic         en,
  input  logic [W-1:0] a,
  output logic [W-1:0] y,
  output logic         oe
);

  assign y  = a & {W{en}};
  assign oe = en;

endmodule
