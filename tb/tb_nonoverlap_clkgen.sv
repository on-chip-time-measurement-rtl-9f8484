// tb_nonoverlap_clkgen: phases never overlap, each has the sampling period,
// delayed phases rise with and fall after their undelayed phases.
`timescale 1ps/1fs
module tb_nonoverlap_clkgen;
  logic clk = 0, rst_n = 0;
  logic phi1, phi1d, phi2, phi2d;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, overlap = 0, order = 0;
  realtime t_r1, t_f1, t_f1d, t_r2, t_f2, t_f2d;

  nonoverlap_clkgen dut (.*);

  always #625 clk = ~clk;     // 800 MHz master -> 100 MHz phases

  always @(posedge phi1) begin n1++; t_r1 = $realtime; end
  always @(posedge phi2) begin n2++; t_r2 = $realtime; end
  always @(negedge phi1)  t_f1  = $realtime;
  always @(negedge phi1d) begin t_f1d = $realtime; if (rst_n && t_f1d <= t_f1) order++; end
  always @(negedge phi2)  t_f2  = $realtime;
  always @(negedge phi2d) begin t_f2d = $realtime; if (rst_n && t_f2d <= t_f2) order++; end
  always @(posedge clk) if (rst_n && (phi1 || phi1d) && (phi2 || phi2d)) overlap++;
  always @(posedge clk) if (rst_n && phi1 && !phi1d) order++;
  always @(posedge clk) if (rst_n && phi2 && !phi2d) order++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000 rst_n = 1;
    #1000000;                       // 1 us = 100 periods
    checks++; if (n1 < 99 || n1 > 101 || n2 < 99 || n2 > 101) begin failures++; $display("FAIL rate %0d %0d", n1, n2); end
    checks++; if (overlap != 0) begin failures++; $display("FAIL overlap %0d", overlap); end
    checks++; if (order != 0) begin failures++; $display("FAIL edge order %0d", order); end
    checks++; if (t_r2 - t_r1 != 5000.0 && t_r1 - t_r2 != 5000.0) begin failures++; $display("FAIL phi1/phi2 spacing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
