// tb_cal_pulse_gen: one 1 ns pulse per trigger edge.
`timescale 1ps/1fs
module tb_cal_pulse_gen;
  logic trigger = 0, pulse;
  int checks = 0, failures = 0;
  realtime tr, tf;
  int n = 0;

  cal_pulse_gen dut (.*);

  always @(posedge pulse) begin tr = $realtime; n++; end
  always @(negedge pulse) tf = $realtime;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin
      #5000 trigger = 1;
      #10000 trigger = 0;
      checks++;
      if (n != k + 1 || (tf - tr) != 1000.0) begin
        failures++; $display("FAIL pulse %0d width %0t", n, tf - tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
