// tb_htdc_mixer: the time-average of the mixer output falls linearly with
// the delay between two equal clocks: VCM + A^2 * (1 - 4*dt/T).
`timescale 1ps/1fs
module tb_htdc_mixer;
  logic clk_in = 0, clk_ref = 0;
  real vm;
  int checks = 0, failures = 0;
  real acc, last_v;
  realtime last_t;

  htdc_mixer dut (.*);

  always @(vm) begin
    acc = acc + last_v * ($realtime - last_t);
    last_v = vm; last_t = $realtime;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      automatic real dt = k * 100.0;     // ps, clock period 1000 ps
      automatic real avg, exp_avg;
      acc = 0.0; last_v = vm; last_t = $realtime;
      fork
        repeat (200) begin clk_ref = 1; #500; clk_ref = 0; #500; end
        begin #(dt); repeat (200) begin clk_in = 1; #500; clk_in = 0; #500; end end
      join
      acc = acc + last_v * ($realtime - last_t);
      avg = acc / (200000.0 + dt);
      // the lead-in (dt) has both clocks differing for dt: correct for it
      exp_avg = 0.6 + 0.36 * (1.0 - 4.0 * dt / 1000.0);
      checks++;
      if (avg < exp_avg - 0.01 || avg > exp_avg + 0.01) begin
        failures++; $display("FAIL dt=%0.0f avg=%f exp=%f", dt, avg, exp_avg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
