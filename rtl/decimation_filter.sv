// decimation_filter: sinc (running-sum) decimator of the delta-sigma ADC.
//
// A counter adds up the ones of the modulator bit stream; a clock divider
// with ratio OSR (the oversampling ratio, 32) marks every OSR-th clock, at
// which the sum of the last OSR bits is copied into the output register and
// the counter restarts. count/OSR is the mean of the input over the
// decimation window; 'strobe' is high for the one clock in which a new value
// appears.
// Interface: clk = modulator clock (one bit per rising edge), active-low
// asynchronous reset, W-bit output (0 .. OSR).
`timescale 1ps/1fs
module decimation_filter #(
  parameter int OSR = 32,
  parameter int W   = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_in,
  output logic [W-1:0] count,
  output logic         strobe
);

  logic [$clog2(OSR)-1:0] div;
  logic [W-1:0]           ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div    <= '0;
      ones   <= '0;
      count  <= '0;
      strobe <= 1'b0;
    end else if (int'(div) == OSR - 1) begin
      div    <= '0;
      ones   <= '0;
      count  <= ones + W'(bit_in);
      strobe <= 1'b1;
    end else begin
      div    <= div + 1'b1;
      ones   <= ones + W'(bit_in);
      strobe <= 1'b0;
    end
  end

  initial assert (OSR + 1 <= 2 ** W) else $error("W too small for OSR");

endmodule
