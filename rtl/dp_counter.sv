// dp_counter: counter and output register of the digital processing block.
//
// The counter runs on the fast counter clock (2 GHz in the design) and
// advances on every rising edge at which 'en' is high. 'en' is driven by the
// processing comparator while the TVC discharges. When 'en' drops (seen one
// clock later) the count is copied into the N-bit output register and
// 'valid' is raised; only the first window after a clear is latched. A high
// 'clr' (start released) clears counter, register and valid synchronously.
//
// Timing: data/valid appear one counter clock after the enable falls. The
// measured interval is  dT1 = (Idis/Ich) * data * Tclk.
// The counter wraps modulo 2^N on overflow (the design says nothing of
// overflow; an 8-bit result covers inputs up to about 10.6 ns).
`timescale 1ps/1fs
module dp_counter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  output logic [N-1:0] data,
  output logic         valid
);

  logic [N-1:0] cnt;
  logic         en_q;

  always_ff @(posedge clk) begin
    if (clr) begin
      cnt   <= '0;
      en_q  <= 1'b0;
      valid <= 1'b0;
      data  <= '0;
    end else begin
      en_q <= en;
      if (en && !valid) cnt <= cnt + 1'b1;
      if (en_q && !en && !valid) begin
        data  <= cnt;
        valid <= 1'b1;
      end
    end
  end

endmodule
