// tb_decimation_filter: every OSR clocks the output equals the number of ones
// in the last OSR input bits; strobe marks each new value.
`timescale 1ps/1fs
module tb_decimation_filter;
  localparam int OSR = 32;
  logic clk = 0, rst_n = 0, bit_in = 0;
  logic [7:0] count;
  logic strobe;
  int checks = 0, failures = 0;
  int ones = 0, k = 0, p = 50;

  decimation_filter #(.OSR(OSR)) dut (.*);

  always #5000 clk = ~clk;

  // reference model: count the bits the filter samples at each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      ones += int'(bit_in);
      k++;
      #1;
      checks++;
      if (k == OSR) begin
        if (!strobe || int'(count) != ones) begin
          failures++; $display("FAIL count=%0d exp=%0d strobe=%0d", count, ones, strobe);
        end
        ones = 0; k = 0;
      end else if (strobe) begin
        failures++; $display("FAIL unexpected strobe");
      end
    end
  end

  always @(negedge clk) bit_in <= ($urandom_range(0, 99) < p);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12000 rst_n = 1;
    repeat (4) begin
      p = 0;   repeat (OSR * 2) @(posedge clk);
      p = 100; repeat (OSR * 2) @(posedge clk);
      p = int'($urandom_range(0, 100)); repeat (OSR * 3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
